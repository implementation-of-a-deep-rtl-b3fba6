// nvdla_sdp - single point data processor: the per-element post-processing
// of convolution results, written back to memory.
//
// Takes the accumulator's 32-bit sums (one pixel of ATOMIC_K output
// channels per input beat) and computes, element by element,
//   v = ((x + bias) * scale) >>> shift          bias add and scaling
//   v = act(v)   none | ReLU max(0, v) | PReLU v < 0 ? (v * a) >>> ashift : v
//   y = saturate v to int8
// with bias, scale, shift, activation, a and ashift taken from the layer's
// registers (one value for the whole layer). THROUGHPUT elements are done
// per cycle (1 by default), so a pixel takes ATOMIC_K/THROUGHPUT cycles and
// the accumulator is held (in_ready low) meanwhile. Each finished atom is
// written to dst_addr + ((pix*kg_total + kg) * 8), the [y][x][kg] layout.
// After start, done pulses once the write responses of all
// out_w*out_h*kg atoms have come back.
//
// Bias (BS) and scaling (BN) with ReLU/PReLU, int8 output and one element
// per cycle follow the small configuration; the fixed-point formulas, the
// per-layer operands and the handshake are this design's choices.
module nvdla_sdp
  import nvdla_pkg::*;
#(
  parameter int unsigned THROUGHPUT = 1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  input  conv_cfg_t                        cfg,
  output logic                             done,
  // from the accumulator
  input  logic                             in_valid,
  output logic                             in_ready,
  input  logic signed [ATOMIC_K-1:0][31:0] in_data,
  input  logic [15:0]                      in_pix,
  input  logic [7:0]                       in_kg,
  // memory write client
  output logic                             wr_req_valid,
  input  logic                             wr_req_ready,
  output addr_t                            wr_req_addr,
  output logic [MEMIF_DW-1:0]              wr_req_data,
  input  logic                             wr_ack
);

  localparam int unsigned STEPS = ATOMIC_K / THROUGHPUT;
  localparam int unsigned EW    = (STEPS > 1) ? $clog2(STEPS) : 1;

  function automatic logic [7:0] sdp_elem(logic signed [31:0] x, conv_cfg_t c);
    logic signed [63:0] v;
    v = (64'(x) + 64'(c.bias)) * 64'(c.scale);
    v = v >>> c.shift;
    if (c.act == ACT_RELU && v < 0)  v = '0;
    if (c.act == ACT_PRELU && v < 0) v = (v * 64'(c.prelu_a)) >>> c.prelu_shift;
    return sat8(v);
  endfunction

  logic          busy, pending, fin;
  logic [EW-1:0] e;
  atom_t         build;
  logic [31:0]   total, acks;

  assign total = 32'(cfg.out_w) * 32'(cfg.out_h) * 32'(cfg.kg);

  // the last step of a pixel needs the write slot to be free
  assign fin      = (e == EW'(STEPS - 1));
  assign in_ready = busy && fin && (!pending || wr_req_ready);
  assign wr_req_valid = pending;

  atom_t nxt;
  always_comb begin
    nxt = build;
    for (int j = 0; j < THROUGHPUT; j++)
      nxt[int'(e) * THROUGHPUT + j] = sdp_elem(in_data[int'(e) * THROUGHPUT + j], cfg);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      pending     <= 1'b0;
      e           <= '0;
      build       <= '0;
      acks        <= '0;
      done        <= 1'b0;
      wr_req_addr <= '0;
      wr_req_data <= '0;
    end else begin
      done <= 1'b0;
      if (wr_req_valid && wr_req_ready) pending <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          acks <= '0;
          e    <= '0;
        end
      end else begin
        if (wr_ack) acks <= acks + 32'd1;
        if (acks == total && !pending) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        if (in_valid && !fin) begin
          build <= nxt;
          e     <= e + 1'b1;
        end else if (in_valid && in_ready) begin
          pending     <= 1'b1;
          wr_req_data <= nxt;
          wr_req_addr <= cfg.dst_addr
                         + ((32'(in_pix) * 32'(cfg.kg) + 32'(in_kg)) << 3);
          e           <= '0;
        end
      end
    end
  end

endmodule

// nvdla_cdp - channel data processor: local response normalisation across
// channels, memory to memory.
//
// For each pixel, b_c = a_c / (k + alpha * sum_j a_j^2)^beta, where j runs
// over the n channels centred on c that exist (n odd, up to 9). The divisor
// is not computed: the host loads a 64-entry look-up table with
// 1/(k + alpha*s)^beta in fixed point, and CDP computes
//   s   = sum of squares over the window (exact integer)
//   lut = LUT[min(s >> lut_shift, 63)]
//   b_c = saturate_int8((a_c * lut) >>> out_shift)
// A pixel is processed in three phases: its cg channel-group atoms are read
// (all reads issued back to back), then one channel per cycle is normalised
// (the one-element-per-cycle throughput of the small configuration), then
// the cg result atoms are written. After start, done pulses once all write
// responses have come back. The table is written and read through its own
// register window (word offset i = entry i, 16 bits) and is not part of the
// ping-pong groups.
//
// The normalisation formula is the described one; the table approximation,
// its size, the shifts and the three-phase schedule are this design's.
module nvdla_cdp
  import nvdla_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  cdp_cfg_t            cfg,
  output logic                done,
  // look-up table register window
  input  logic                lut_sel,
  input  reg_req_t            lut_req,
  output logic [31:0]         lut_rdata,
  // memory
  output logic                rd_req_valid,
  input  logic                rd_req_ready,
  output addr_t               rd_req_addr,
  input  logic                rd_resp_valid,
  input  logic [MEMIF_DW-1:0] rd_resp_data,
  output logic                wr_req_valid,
  input  logic                wr_req_ready,
  output addr_t               wr_req_addr,
  output logic [MEMIF_DW-1:0] wr_req_data,
  input  logic                wr_ack
);

  localparam int unsigned NCH  = CDP_MAX_CG * ATOMIC_C;
  localparam int unsigned HALF = CDP_MAX_N / 2;
  localparam int unsigned LW   = $clog2(CDP_LUT_N);

  logic [15:0] lut [CDP_LUT_N];

  assign lut_rdata = (int'(lut_req.addr) < CDP_LUT_N) ? {16'd0, lut[lut_req.addr[LW-1:0]]} : '0;
  always_ff @(posedge clk) begin
    if (lut_sel && lut_req.wr && int'(lut_req.addr) < CDP_LUT_N)
      lut[lut_req.addr[LW-1:0]] <= lut_req.wdat[15:0];
  end

  typedef enum logic [2:0] {S_IDLE, S_RD, S_CALC, S_WR, S_FLUSH} state_e;
  state_e state;

  logic [NCH-1:0][7:0] ibuf, obuf;
  logic [31:0] p, acks, total;
  logic [7:0]  nrd, nresp, nwr;
  logic [15:0] c;                       // channel being normalised
  logic [15:0] nch;

  assign nch   = 16'(cfg.cg) * 16'(ATOMIC_C);
  assign total = cfg.npix * 32'(cfg.cg);

  assign rd_req_valid = (state == S_RD) && (nrd < cfg.cg);
  assign rd_req_addr  = cfg.src_addr + ((p * 32'(cfg.cg) + 32'(nrd)) << 3);
  assign wr_req_valid = (state == S_WR);
  assign wr_req_addr  = cfg.dst_addr + ((p * 32'(cfg.cg) + 32'(nwr)) << 3);
  assign wr_req_data  = obuf[int'(nwr) * ATOMIC_C +: ATOMIC_C];

  // normalise channel c
  logic [31:0]        sumsq, idx;
  logic signed [63:0] prod;
  logic [7:0]         res;
  always_comb begin
    logic signed [15:0] sq;
    int                 j, ad;
    sumsq = '0;
    for (int d = -int'(HALF); d <= int'(HALF); d++) begin
      j  = int'(c) + d;
      ad = (d < 0) ? -d : d;
      sq = '0;
      if (ad <= int'(cfg.n) / 2 && j >= 0 && j < int'(nch))
        sq = signed'(ibuf[j[$clog2(NCH)-1:0]]) * signed'(ibuf[j[$clog2(NCH)-1:0]]);
      sumsq = sumsq + 32'(sq);
    end
    idx  = sumsq >> cfg.lut_shift;
    if (idx > CDP_LUT_N - 1) idx = CDP_LUT_N - 1;
    prod = (64'(signed'(ibuf[c[$clog2(NCH)-1:0]])) * signed'(64'(lut[idx[LW-1:0]]))) >>> cfg.out_shift;
    res  = sat8(prod);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      {p, acks} <= '0;
      {nrd, nresp, nwr} <= '0;
      c    <= '0;
      ibuf <= '0;
      obuf <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (wr_ack) acks <= acks + 32'd1;
      case (state)
        S_IDLE: if (start) begin
          state <= (cfg.npix == 0) ? S_FLUSH : S_RD;
          {p, acks} <= '0;
          {nrd, nresp, nwr} <= '0;
        end
        S_RD: begin
          if (rd_req_valid && rd_req_ready) nrd <= nrd + 8'd1;
          if (rd_resp_valid) begin
            ibuf[int'(nresp) * ATOMIC_C +: ATOMIC_C] <= rd_resp_data;
            nresp <= nresp + 8'd1;
          end
          if (nresp == cfg.cg) begin
            state <= S_CALC;
            c     <= '0;
          end
        end
        S_CALC: begin
          obuf[c[$clog2(NCH)-1:0]] <= res;
          c <= c + 16'd1;
          if (c == nch - 16'd1) begin
            state <= S_WR;
            nwr   <= '0;
          end
        end
        S_WR: if (wr_req_ready) begin
          nwr <= nwr + 8'd1;
          if (nwr == cfg.cg - 8'd1) begin
            {nrd, nresp} <= '0;
            p <= p + 32'd1;
            state <= (p == cfg.npix - 32'd1) ? S_FLUSH : S_RD;
          end
        end
        S_FLUSH: if (acks == total) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_cg_fits: assert property (@(posedge clk) disable iff (!rst_n)
      state != S_IDLE |-> cfg.cg <= 8'(CDP_MAX_CG));

endmodule

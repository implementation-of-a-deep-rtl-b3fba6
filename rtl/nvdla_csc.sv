// nvdla_csc - convolution sequence controller.
//
// Reads weights and feature atoms from the convolution buffer and feeds them
// to the MAC array in the order that lets the array keep its weights still.
// For every kernel group kg and every kernel step (r, s, cg) it first loads
// the ATOMIC_K weight atoms of that step into the MAC cells (ATOMIC_K
// cycles), then streams one feature atom per cycle for every output pixel
// (oy, ox): the atom at input pixel (oy*stride + r - pad_y,
// ox*stride + s - pad_x), channel group cg. Where that pixel lies outside
// the input (zero padding) no buffer read is made and a zero atom goes to
// the array instead; padding on the right and bottom follows from the
// programmed output size. Each atom carries a tag with its output pixel and whether it is
// the first or last kernel step, so the accumulator knows when to start and
// when a sum is complete. After the last step of a kernel group the
// sequencer waits for the accumulator's "drained" pulse before it starts the
// next group; after the last group it pulses done.
//
// Buffer reads take one cycle, so the MAC array's controls are the issue
// controls delayed by one cycle. One MAC operation on an 8 x 8 array per
// cycle (64 MACs) while streaming; ATOMIC_K cycles of weight loading per
// kernel step.
//
// Sequencing buffer contents into the MAC units is the described function;
// the weight-stationary order, the tags and the timing are this design's.
// Stride is the same in x and y; padding is up to 15 pixels per side.
module nvdla_csc
  import nvdla_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  conv_cfg_t                     cfg,
  output logic                          done,
  // convolution buffer read port
  output logic                          cbuf_rd_en,
  output logic [CBUF_AW-1:0]            cbuf_rd_addr,
  input  atom_t                         cbuf_rd_data,
  // MAC array
  output logic                          wt_valid,
  output logic [$clog2(ATOMIC_K)-1:0]   wt_k,
  output atom_t                         wt_data,
  output logic                          dat_valid,
  output atom_t                         dat_data,
  output conv_tag_t                     dat_tag,
  input  logic                          drained
);

  typedef enum logic [1:0] {S_IDLE, S_WLOAD, S_DATA, S_WAIT} state_e;
  state_e state;

  logic [7:0]  kg, r, s, cg;
  logic [$clog2(ATOMIC_K)-1:0] k;
  logic [15:0] ox, oy, pix;
  logic [CBUF_AW-1:0] widx;
  logic first_step, last_step;

  assign first_step = (r == 8'd0) && (s == 8'd0) && (cg == 8'd0);
  assign last_step  = (r == cfg.kh - 8'd1) && (s == cfg.kw - 8'd1) && (cg == cfg.cg - 8'd1);

  // buffer address of the current request; iy, ix are input coordinates
  // plus the padding, so a padded position is below pad or beyond in + pad
  logic [31:0] iy, ix, dat_entry;
  logic        pad_hit;
  always_comb begin
    iy        = 32'(oy) * 32'(cfg.stride) + 32'(r);
    ix        = 32'(ox) * 32'(cfg.stride) + 32'(s);
    pad_hit   = (iy < 32'(cfg.pad_y)) || (iy >= 32'(cfg.in_h) + 32'(cfg.pad_y)) ||
                (ix < 32'(cfg.pad_x)) || (ix >= 32'(cfg.in_w) + 32'(cfg.pad_x));
    dat_entry = ((iy - 32'(cfg.pad_y)) * 32'(cfg.in_w) + (ix - 32'(cfg.pad_x))) * 32'(cfg.cg)
                + 32'(cg);
  end

  assign cbuf_rd_en   = (state == S_WLOAD) || (state == S_DATA && !pad_hit);
  assign cbuf_rd_addr = (state == S_WLOAD)
                        ? CBUF_AW'({cfg.wt_bank, 9'd0}) + widx
                        : dat_entry[CBUF_AW-1:0];

  // controls for the MAC array, one cycle behind the buffer read
  logic      p_wt, p_dat, p_zero;
  logic [$clog2(ATOMIC_K)-1:0] p_k;
  conv_tag_t p_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_wt  <= 1'b0;
      p_dat <= 1'b0;
      p_zero <= 1'b0;
      p_k   <= '0;
      p_tag <= '0;
    end else begin
      p_wt  <= (state == S_WLOAD);
      p_dat <= (state == S_DATA);
      p_zero <= (state == S_DATA) && pad_hit;
      p_k   <= k;
      p_tag <= '{pix: pix, kg: kg, first: first_step, last: last_step};
    end
  end

  assign wt_valid  = p_wt;
  assign wt_k      = p_k;
  assign wt_data   = cbuf_rd_data;
  assign dat_valid = p_dat;
  assign dat_data  = p_zero ? '0 : cbuf_rd_data;
  assign dat_tag   = p_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      {kg, r, s, cg} <= '0;
      k    <= '0;
      {ox, oy, pix} <= '0;
      widx <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_WLOAD;
          {kg, r, s, cg} <= '0;
          k    <= '0;
          widx <= '0;
        end
        S_WLOAD: begin
          k    <= k + 1'b1;
          widx <= widx + 1'b1;
          if (k == $clog2(ATOMIC_K)'(ATOMIC_K - 1)) begin
            state <= S_DATA;
            {ox, oy, pix} <= '0;
          end
        end
        S_DATA: begin
          pix <= pix + 16'd1;
          if (ox == cfg.out_w - 16'd1) begin
            ox <= '0;
            oy <= oy + 16'd1;
            if (oy == cfg.out_h - 16'd1) begin
              // plane done: next kernel step
              if (last_step) state <= S_WAIT;
              else begin
                state <= S_WLOAD;
                k     <= '0;
                if (cg != cfg.cg - 8'd1) cg <= cg + 8'd1;
                else begin
                  cg <= '0;
                  if (s != cfg.kw - 8'd1) s <= s + 8'd1;
                  else begin
                    s <= '0;
                    r <= r + 8'd1;
                  end
                end
              end
            end
          end else ox <= ox + 16'd1;
        end
        S_WAIT: if (drained) begin
          {r, s, cg} <= '0;
          k <= '0;
          if (kg == cfg.kg - 8'd1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            kg    <= kg + 8'd1;
            state <= S_WLOAD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

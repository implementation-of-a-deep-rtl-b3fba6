// nvdla_cmac - convolution MAC array.
//
// ATOMIC_K MAC cells, one per output channel of the current kernel group.
// Each cell holds one weight atom (ATOMIC_C int8 weights) and multiplies it
// with the feature atom broadcast to all cells, summing the ATOMIC_C
// products in an adder tree: 8 x 8 = 64 int8 multipliers by default.
// Weights are loaded one cell per cycle (wt_valid, wt_k) and stay in place
// while a stream of feature atoms passes (weight-stationary). The partial
// sums leave registered, one cycle after dat_valid, together with the
// atom's tag.
//
// The array size Atomic-C x Atomic-K and int8 operands are the small
// configuration's; weight-stationary loading and the one-cycle latency are
// this design's choices.
module nvdla_cmac
  import nvdla_pkg::*;
(
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             wt_valid,
  input  logic [$clog2(ATOMIC_K)-1:0]      wt_k,
  input  atom_t                            wt_data,
  input  logic                             dat_valid,
  input  atom_t                            dat_data,
  input  conv_tag_t                        dat_tag,
  output logic                             psum_valid,
  output logic signed [ATOMIC_K-1:0][31:0] psum,
  output conv_tag_t                        psum_tag
);

  atom_t wt [ATOMIC_K];

  always_ff @(posedge clk) begin
    if (wt_valid) wt[wt_k] <= wt_data;
  end

  logic signed [ATOMIC_K-1:0][31:0] sum;
  always_comb begin
    logic signed [15:0] a, b;
    for (int k = 0; k < ATOMIC_K; k++) begin
      sum[k] = '0;
      for (int c = 0; c < ATOMIC_C; c++) begin
        a      = 16'(signed'(dat_data[c]));
        b      = 16'(signed'(wt[k][c]));
        sum[k] = sum[k] + 32'(a * b);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      psum_valid <= 1'b0;
      psum       <= '0;
      psum_tag   <= '0;
    end else begin
      psum_valid <= dat_valid;
      if (dat_valid) begin
        psum     <= sum;
        psum_tag <= dat_tag;
      end
    end
  end

endmodule

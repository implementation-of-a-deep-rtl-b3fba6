// nvdla_cacc - convolution accumulator.
//
// Holds one 32-bit sum per output channel of the current kernel group for
// every output pixel of the layer (ACC_DEPTH pixels at most). A partial sum
// tagged "first" overwrites the pixel's entry, later ones add to it. When
// the partial sum tagged "last" for the final pixel (npix-1) arrives, the
// plane is complete and CACC drains it in pixel order to SDP over a
// valid/ready stream, one pixel (ATOMIC_K sums) per accepted cycle. A
// one-cycle "drained" pulse marks the end of the drain; the sequencer waits
// for it before starting the next kernel group.
//
// Accumulating the MAC array's partial sums before activation follows the
// description; the storage depth, the drain protocol and the 32-bit sums
// are this design's choices.
module nvdla_cacc
  import nvdla_pkg::*;
#(
  parameter int unsigned ACC_DEPTH = 4096
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [15:0]                      npix,
  input  logic                             psum_valid,
  input  logic signed [ATOMIC_K-1:0][31:0] psum,
  input  conv_tag_t                        psum_tag,
  output logic                             out_valid,
  input  logic                             out_ready,
  output logic signed [ATOMIC_K-1:0][31:0] out_data,
  output logic [15:0]                      out_pix,
  output logic [7:0]                       out_kg,
  output logic                             drained
);

  localparam int unsigned AW = $clog2(ACC_DEPTH);

  logic signed [ATOMIC_K-1:0][31:0] acc [ACC_DEPTH];
  logic                             draining;
  logic [15:0]                      rp;

  // accumulate
  always_ff @(posedge clk) begin
    if (psum_valid) begin
      for (int k = 0; k < ATOMIC_K; k++)
        acc[psum_tag.pix[AW-1:0]][k] <= psum_tag.first ? psum[k]
                                      : acc[psum_tag.pix[AW-1:0]][k] + psum[k];
    end
  end

  assign out_valid = draining;
  assign out_data  = acc[rp[AW-1:0]];
  assign out_pix   = rp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      draining <= 1'b0;
      rp       <= '0;
      out_kg   <= '0;
      drained  <= 1'b0;
    end else begin
      drained <= 1'b0;
      if (psum_valid && psum_tag.last && psum_tag.pix == npix - 16'd1) begin
        draining <= 1'b1;
        rp       <= '0;
        out_kg   <= psum_tag.kg;
      end else if (draining && out_ready) begin
        if (rp == npix - 16'd1) begin
          draining <= 1'b0;
          drained  <= 1'b1;
        end
        rp <= rp + 16'd1;
      end
    end
  end

  a_no_acc_while_draining: assert property (@(posedge clk) disable iff (!rst_n)
      !(draining && psum_valid));
  a_fits: assert property (@(posedge clk) disable iff (!rst_n)
      psum_valid |-> psum_tag.pix < 16'(ACC_DEPTH));

endmodule

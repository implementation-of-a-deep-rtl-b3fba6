// nvdla_cbuf - convolution buffer: on-chip storage for the feature data and
// the weights of one convolution layer.
//
// CBUF_BANK_NUM banks of CBUF_BANK_DEPTH entries, each entry one atom of
// CBUF_BANK_WIDTH bytes (32 x 512 x 8 bytes = 128 KiB by default). Entries
// are addressed by a flat index: bits above log2(depth) pick the bank, the
// rest the entry in the bank. The host splits the banks between data (from
// bank 0 up) and weights (from a programmed first weight bank up).
// One write port (from CDMA) and one read port (to CSC); a read returns its
// entry on rd_data in the cycle after rd_en. Contents are not reset.
//
// Bank count, width and depth are the small configuration's; the flat
// addressing and the single read port are this design's choices.
module nvdla_cbuf
  import nvdla_pkg::*;
#(
  parameter int unsigned BANKS = CBUF_BANK_NUM,
  parameter int unsigned DEPTH = CBUF_BANK_DEPTH,
  localparam int unsigned AW   = $clog2(BANKS * DEPTH),
  localparam int unsigned DW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  atom_t         wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output atom_t         rd_data
);

  atom_t mem [BANKS][DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr[AW-1:DW]][wr_addr[DW-1:0]] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr[AW-1:DW]][rd_addr[DW-1:0]];
  end

endmodule

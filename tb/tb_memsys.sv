// tb_memsys - memory system for unit testbenches: the memory client
// interface (nvdla_mcif) in front of the behavioural AXI memory
// (tb_axi_mem). Testbenches reach the memory array as u_mem.mem.
module tb_memsys
  import nvdla_pkg::*;
#(
  parameter int unsigned LAT       = 5,
  parameter int unsigned READY_PCT = 60
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NUM_RD-1:0]         rd_req_valid,
  output logic [NUM_RD-1:0]         rd_req_ready,
  input  addr_t [NUM_RD-1:0]        rd_req_addr,
  output logic [NUM_RD-1:0]         rd_resp_valid,
  output logic [MEMIF_DW-1:0]       rd_resp_data,
  input  logic [NUM_WR-1:0]         wr_req_valid,
  output logic [NUM_WR-1:0]         wr_req_ready,
  input  addr_t [NUM_WR-1:0]        wr_req_addr,
  input  logic [NUM_WR-1:0][MEMIF_DW-1:0] wr_req_data,
  output logic [NUM_WR-1:0]         wr_ack
);

  logic                  awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic                  arvalid, arready, rvalid, rready, rlast;
  logic [AXI_IDW-1:0]    awid, bid, arid, rid;
  logic [7:0]            awlen, arlen;
  logic [2:0]            awsize, arsize;
  logic [MEM_AW-1:0]     awaddr, araddr;
  logic [MEMIF_DW-1:0]   wdata, rdata;
  logic [MEMIF_DW/8-1:0] wstrb;

  nvdla_mcif u_mcif (
    .clk, .rst_n,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .wr_req_valid, .wr_req_ready, .wr_req_addr, .wr_req_data, .wr_ack,
    .aw_awvalid(awvalid), .aw_awready(awready), .aw_awid(awid), .aw_awlen(awlen),
    .aw_awsize(awsize), .aw_awaddr(awaddr), .w_wvalid(wvalid), .w_wready(wready),
    .w_wdata(wdata), .w_wstrb(wstrb), .w_wlast(wlast), .b_bvalid(bvalid),
    .b_bready(bready), .b_bid(bid), .ar_arvalid(arvalid), .ar_arready(arready),
    .ar_arid(arid), .ar_arlen(arlen), .ar_arsize(arsize), .ar_araddr(araddr),
    .r_rvalid(rvalid), .r_rready(rready), .r_rid(rid), .r_rlast(rlast), .r_rdata(rdata)
  );

  tb_axi_mem #(.WORDS(16384), .LAT(LAT), .READY_PCT(READY_PCT)) u_mem (
    .clk, .rst_n, .awvalid, .awready, .awid, .awaddr, .wvalid, .wready, .wdata,
    .bvalid, .bready, .bid, .arvalid, .arready, .arid, .araddr,
    .rvalid, .rready, .rid, .rlast, .rdata
  );

endmodule

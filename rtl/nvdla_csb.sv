// nvdla_csb - configuration space bus slave of the core.
//
// Accepts one CSB request per cycle (csb2nvdla_ready is always 1) and
// forwards it as a register access (reg_req_t) to the unit selected by
// address bits [15:8]: 0x00 GLB, 0x01 CFGROM, 0x10 CONV, 0x20 PDP, 0x30 CDP,
// 0x31 CDP look-up table. Units answer reads combinationally; the CSB slave
// registers the answer, so read data appears on nvdla2csb_valid/data one
// cycle after the request is accepted. Reads of an unmapped unit return 0.
// A non-posted write is acknowledged with a one-cycle nvdla2csb_wr_complete
// pulse one cycle after acceptance; posted writes are not acknowledged.
//
// The signal names follow the core's published pin list; the timing and the
// unit map are this design's choices.
module nvdla_csb
  import nvdla_pkg::*;
#(
  parameter int unsigned NUNIT = 6
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   csb2nvdla_valid,
  output logic                   csb2nvdla_ready,
  input  logic [CSB_AW-1:0]      csb2nvdla_addr,
  input  logic [CSB_DW-1:0]      csb2nvdla_wdat,
  input  logic                   csb2nvdla_write,
  input  logic                   csb2nvdla_nposted,
  output logic                   nvdla2csb_valid,
  output logic [CSB_DW-1:0]      nvdla2csb_data,
  output logic                   nvdla2csb_wr_complete,
  // to the units
  output reg_req_t               req,
  output logic [NUNIT-1:0]       sel,
  input  logic [NUNIT-1:0][31:0] rdata
);

  // unit index of each select value, in the order of the sel vector
  localparam logic [7:0] UNIT_CODE [6] = '{UNIT_GLB, UNIT_CFGROM, UNIT_CONV,
                                           UNIT_PDP, UNIT_CDP, UNIT_CDP_LUT};

  logic acc;
  assign csb2nvdla_ready = 1'b1;
  assign acc = csb2nvdla_valid && csb2nvdla_ready;

  always_comb begin
    req.wr   = acc && csb2nvdla_write;
    req.rd   = acc && !csb2nvdla_write;
    req.addr = csb2nvdla_addr[7:0];
    req.wdat = csb2nvdla_wdat;
    for (int u = 0; u < NUNIT; u++)
      sel[u] = (u < 6) && (csb2nvdla_addr[15:8] == UNIT_CODE[u]);
  end

  logic [31:0] rd_mux;
  always_comb begin
    rd_mux = '0;
    for (int u = 0; u < NUNIT; u++)
      if (sel[u]) rd_mux = rdata[u];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nvdla2csb_valid       <= 1'b0;
      nvdla2csb_data        <= '0;
      nvdla2csb_wr_complete <= 1'b0;
    end else begin
      nvdla2csb_valid       <= req.rd;
      nvdla2csb_wr_complete <= req.wr && csb2nvdla_nposted;
      if (req.rd) nvdla2csb_data <= rd_mux;
    end
  end

endmodule

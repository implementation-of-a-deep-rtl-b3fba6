// nvdla_wrapper - the accelerator subsystem as seen by a host system: the
// core joined to its APB-to-CSB bridge.
//
// The host programs the core through an APB slave port (a 64 KiB register
// window: CSB word address = paddr[17:2]), receives the level interrupt
// dla_intr, and gives the core an AXI4 master port to system memory (64-bit
// data, 32-bit addresses). Clock-gating, power-gating and test controls are
// brought out as pins, as on the packaged subsystem; in this design they
// have no effect. The APB clock pclk must be the core clock, and the CSB
// clock is the same clock too. nvdla2csb_wr_complete is brought out.
//
// The combination of bridge and core and the pin set follow the described
// subsystem; the APB signal set (psel, penable, pwrite, paddr, pwdata,
// prdata, pready, pslverr) is the standard APB3 one.
module nvdla_wrapper
  import nvdla_pkg::*;
(
  input  logic                  pclk,
  input  logic                  prstn,
  input  logic                  dla_core_clk,
  input  logic                  dla_csb_clk,
  input  logic                  dla_reset_rstn,
  input  logic                  direct_reset_,
  input  logic                  global_clk_ovr_on,
  input  logic                  tmc2slcg_disable_clock_gating,
  input  logic                  test_mode,
  input  logic [31:0]           nvdla_pwrbus_ram_c_pd,
  input  logic [31:0]           nvdla_pwrbus_ram_ma_pd,
  input  logic [31:0]           nvdla_pwrbus_ram_mb_pd,
  input  logic [31:0]           nvdla_pwrbus_ram_p_pd,
  input  logic [31:0]           nvdla_pwrbus_ram_o_pd,
  input  logic [31:0]           nvdla_pwrbus_ram_a_pd,
  // APB slave
  input  logic                  psel,
  input  logic                  penable,
  input  logic                  pwrite,
  input  logic [31:0]           paddr,
  input  logic [31:0]           pwdata,
  output logic [31:0]           prdata,
  output logic                  pready,
  output logic                  pslverr,
  // AXI4 master
  output logic                  nvdla_core2dbb_aw_awvalid,
  input  logic                  nvdla_core2dbb_aw_awready,
  output logic [AXI_IDW-1:0]    nvdla_core2dbb_aw_awid,
  output logic [7:0]            nvdla_core2dbb_aw_awlen,
  output logic [2:0]            nvdla_core2dbb_aw_awsize,
  output logic [MEM_AW-1:0]     nvdla_core2dbb_aw_awaddr,
  output logic                  nvdla_core2dbb_w_wvalid,
  input  logic                  nvdla_core2dbb_w_wready,
  output logic [MEMIF_DW-1:0]   nvdla_core2dbb_w_wdata,
  output logic [MEMIF_DW/8-1:0] nvdla_core2dbb_w_wstrb,
  output logic                  nvdla_core2dbb_w_wlast,
  input  logic                  nvdla_core2dbb_b_bvalid,
  output logic                  nvdla_core2dbb_b_bready,
  input  logic [AXI_IDW-1:0]    nvdla_core2dbb_b_bid,
  output logic                  nvdla_core2dbb_ar_arvalid,
  input  logic                  nvdla_core2dbb_ar_arready,
  output logic [AXI_IDW-1:0]    nvdla_core2dbb_ar_arid,
  output logic [7:0]            nvdla_core2dbb_ar_arlen,
  output logic [2:0]            nvdla_core2dbb_ar_arsize,
  output logic [MEM_AW-1:0]     nvdla_core2dbb_ar_araddr,
  input  logic                  nvdla_core2dbb_r_rvalid,
  output logic                  nvdla_core2dbb_r_rready,
  input  logic [AXI_IDW-1:0]    nvdla_core2dbb_r_rid,
  input  logic                  nvdla_core2dbb_r_rlast,
  input  logic [MEMIF_DW-1:0]   nvdla_core2dbb_r_rdata,
  output logic                  dla_intr,
  output logic                  nvdla2csb_wr_complete
);

  logic              csb2nvdla_valid, csb2nvdla_ready, csb2nvdla_write, csb2nvdla_nposted;
  logic [CSB_AW-1:0] csb2nvdla_addr;
  logic [CSB_DW-1:0] csb2nvdla_wdat, nvdla2csb_data;
  logic              nvdla2csb_valid;

  apb2csb u_apb2csb (
    .pclk, .prstn, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .csb2nvdla_valid, .csb2nvdla_ready, .csb2nvdla_addr, .csb2nvdla_wdat,
    .csb2nvdla_write, .csb2nvdla_nposted, .nvdla2csb_valid, .nvdla2csb_data
  );

  nvdla_core u_core (.*);

endmodule

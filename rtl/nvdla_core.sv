// nvdla_core - the accelerator core in its small configuration.
//
// The host programs layers through the configuration space bus (CSB) and
// learns of their completion through the level interrupt dla_intr: a
// command-execute-interrupt flow. Data moves over one AXI4 master (the data
// backbone, 64-bit data, 32-bit addresses) shared by all DMA engines.
//
// Processing units, each with two ping-pong register groups:
//   CONV  CDMA loads features and weights into the convolution buffer
//         (CBUF); then CSC streams them through the 8 x 8 MAC array (CMAC);
//         CACC sums the partial sums and hands complete planes to SDP, which
//         adds bias, scales, applies ReLU/PReLU, saturates to int8 and writes
//         the output cube. The layer is done when SDP's writes are answered.
//   PDP   pooling (max/min/average), memory to memory.
//   CDP   local response normalisation, memory to memory.
// GLB gathers done events (CDMA, CONV, PDP, CDP, one bit per group) into
// the interrupt; CFGROM describes the configuration. Units run
// concurrently when their register groups are enabled.
//
// Pins follow the core's published pin list. Clock gating, power gating and
// test (DFT) features are not built: global_clk_ovr_on,
// tmc2slcg_disable_clock_gating, test_mode and the nvdla_pwrbus_* inputs
// have no effect, as on the FPGA build where they are tied off.
// dla_csb_clk must be the same clock as dla_core_clk: the whole core runs on
// dla_core_clk. The reset is dla_reset_rstn AND direct_reset_ (both active
// low, asynchronous assert).
module nvdla_core
  import nvdla_pkg::*;
(
  input  logic                  dla_core_clk,
  input  logic                  dla_csb_clk,
  input  logic                  global_clk_ovr_on,
  input  logic                  tmc2slcg_disable_clock_gating,
  input  logic                  dla_reset_rstn,
  input  logic                  direct_reset_,
  input  logic                  test_mode,
  input  logic [31:0]           nvdla_pwrbus_ram_c_pd,
  input  logic [31:0]           nvdla_pwrbus_ram_ma_pd,
  input  logic [31:0]           nvdla_pwrbus_ram_mb_pd,
  input  logic [31:0]           nvdla_pwrbus_ram_p_pd,
  input  logic [31:0]           nvdla_pwrbus_ram_o_pd,
  input  logic [31:0]           nvdla_pwrbus_ram_a_pd,
  // configuration space bus
  input  logic                  csb2nvdla_valid,
  output logic                  csb2nvdla_ready,
  input  logic [CSB_AW-1:0]     csb2nvdla_addr,
  input  logic [CSB_DW-1:0]     csb2nvdla_wdat,
  input  logic                  csb2nvdla_write,
  input  logic                  csb2nvdla_nposted,
  output logic                  nvdla2csb_valid,
  output logic [CSB_DW-1:0]     nvdla2csb_data,
  output logic                  nvdla2csb_wr_complete,
  // data backbone, AXI4 master
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
  // interrupt
  output logic                  dla_intr
);

  logic clk, rst_n;
  assign clk   = dla_core_clk;
  assign rst_n = dla_reset_rstn & direct_reset_;

  // ---------------- configuration ----------------
  localparam int unsigned NUNIT = 6;
  localparam int unsigned U_GLB = 0, U_ROM = 1, U_CONV = 2, U_PDP = 3, U_CDP = 4, U_LUT = 5;

  reg_req_t               req;
  logic [NUNIT-1:0]       sel;
  logic [NUNIT-1:0][31:0] rdata;

  nvdla_csb #(.NUNIT(NUNIT)) u_csb (
    .clk, .rst_n,
    .csb2nvdla_valid, .csb2nvdla_ready, .csb2nvdla_addr, .csb2nvdla_wdat,
    .csb2nvdla_write, .csb2nvdla_nposted, .nvdla2csb_valid, .nvdla2csb_data,
    .nvdla2csb_wr_complete,
    .req, .sel, .rdata
  );

  nvdla_cfgrom u_cfgrom (.req, .rdata(rdata[U_ROM]));

  regs_t conv_regs, pdp_regs, cdp_regs;
  logic  conv_en, pdp_en, cdp_en;
  logic  conv_grp, pdp_grp, cdp_grp;
  logic  conv_done, pdp_done, cdp_done;
  logic [1:0] conv_ev, pdp_ev, cdp_ev, cdma_ev;

  nvdla_reg_dual u_conv_regs (.clk, .rst_n, .sel(sel[U_CONV]), .req, .rdata(rdata[U_CONV]),
    .cfg(conv_regs), .op_en(conv_en), .cur_group(conv_grp), .done(conv_done), .done_ev(conv_ev));
  nvdla_reg_dual u_pdp_regs (.clk, .rst_n, .sel(sel[U_PDP]), .req, .rdata(rdata[U_PDP]),
    .cfg(pdp_regs), .op_en(pdp_en), .cur_group(pdp_grp), .done(pdp_done), .done_ev(pdp_ev));
  nvdla_reg_dual u_cdp_regs (.clk, .rst_n, .sel(sel[U_CDP]), .req, .rdata(rdata[U_CDP]),
    .cfg(cdp_regs), .op_en(cdp_en), .cur_group(cdp_grp), .done(cdp_done), .done_ev(cdp_ev));

  conv_cfg_t ccfg;
  pdp_cfg_t  pcfg;
  cdp_cfg_t  dcfg;
  assign ccfg = conv_cfg(conv_regs);
  assign pcfg = pdp_cfg(pdp_regs);
  assign dcfg = cdp_cfg(cdp_regs);

  nvdla_glb u_glb (.clk, .rst_n, .sel(sel[U_GLB]), .req, .rdata(rdata[U_GLB]),
    .ev({cdp_ev, pdp_ev, conv_ev, cdma_ev}), .intr(dla_intr));

  // ---------------- memory interface ----------------
  logic [NUM_RD-1:0]         rd_req_valid, rd_req_ready, rd_resp_valid;
  addr_t [NUM_RD-1:0]        rd_req_addr;
  logic [MEMIF_DW-1:0]       rd_resp_data;
  logic [NUM_WR-1:0]         wr_req_valid, wr_req_ready, wr_ack;
  addr_t [NUM_WR-1:0]        wr_req_addr;
  logic [NUM_WR-1:0][MEMIF_DW-1:0] wr_req_data;

  nvdla_mcif u_mcif (
    .clk, .rst_n,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_resp_valid, .rd_resp_data,
    .wr_req_valid, .wr_req_ready, .wr_req_addr, .wr_req_data, .wr_ack,
    .aw_awvalid(nvdla_core2dbb_aw_awvalid), .aw_awready(nvdla_core2dbb_aw_awready),
    .aw_awid(nvdla_core2dbb_aw_awid), .aw_awlen(nvdla_core2dbb_aw_awlen),
    .aw_awsize(nvdla_core2dbb_aw_awsize), .aw_awaddr(nvdla_core2dbb_aw_awaddr),
    .w_wvalid(nvdla_core2dbb_w_wvalid), .w_wready(nvdla_core2dbb_w_wready),
    .w_wdata(nvdla_core2dbb_w_wdata), .w_wstrb(nvdla_core2dbb_w_wstrb),
    .w_wlast(nvdla_core2dbb_w_wlast),
    .b_bvalid(nvdla_core2dbb_b_bvalid), .b_bready(nvdla_core2dbb_b_bready),
    .b_bid(nvdla_core2dbb_b_bid),
    .ar_arvalid(nvdla_core2dbb_ar_arvalid), .ar_arready(nvdla_core2dbb_ar_arready),
    .ar_arid(nvdla_core2dbb_ar_arid), .ar_arlen(nvdla_core2dbb_ar_arlen),
    .ar_arsize(nvdla_core2dbb_ar_arsize), .ar_araddr(nvdla_core2dbb_ar_araddr),
    .r_rvalid(nvdla_core2dbb_r_rvalid), .r_rready(nvdla_core2dbb_r_rready),
    .r_rid(nvdla_core2dbb_r_rid), .r_rlast(nvdla_core2dbb_r_rlast),
    .r_rdata(nvdla_core2dbb_r_rdata)
  );

  // ---------------- convolution pipeline ----------------
  typedef enum logic [1:0] {C_IDLE, C_LOAD, C_RUN} conv_state_e;
  conv_state_e cstate;
  logic cdma_start, cdma_done, csc_start, csc_done, sdp_done;

  assign cdma_start = (cstate == C_IDLE) && conv_en;
  assign conv_done  = (cstate == C_RUN) && sdp_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate    <= C_IDLE;
      csc_start <= 1'b0;
      cdma_ev   <= '0;
    end else begin
      csc_start <= 1'b0;
      cdma_ev   <= '0;
      case (cstate)
        C_IDLE: if (conv_en) cstate <= C_LOAD;
        C_LOAD: if (cdma_done) begin
          cstate            <= C_RUN;
          csc_start         <= 1'b1;
          cdma_ev[conv_grp] <= 1'b1;
        end
        C_RUN:  if (sdp_done) cstate <= C_IDLE;
        default: cstate <= C_IDLE;
      endcase
    end
  end

  logic               cbuf_wr_en, cbuf_rd_en;
  logic [CBUF_AW-1:0] cbuf_wr_addr, cbuf_rd_addr;
  atom_t              cbuf_wr_data, cbuf_rd_data;

  nvdla_cdma u_cdma (
    .clk, .rst_n, .start(cdma_start), .cfg(ccfg), .done(cdma_done),
    .rd_req_valid(rd_req_valid[RD_CDMA]), .rd_req_ready(rd_req_ready[RD_CDMA]),
    .rd_req_addr(rd_req_addr[RD_CDMA]), .rd_resp_valid(rd_resp_valid[RD_CDMA]),
    .rd_resp_data, .cbuf_wr_en, .cbuf_wr_addr, .cbuf_wr_data
  );

  nvdla_cbuf u_cbuf (
    .clk, .wr_en(cbuf_wr_en), .wr_addr(cbuf_wr_addr), .wr_data(cbuf_wr_data),
    .rd_en(cbuf_rd_en), .rd_addr(cbuf_rd_addr), .rd_data(cbuf_rd_data)
  );

  logic                             wt_valid, dat_valid, psum_valid, drained;
  logic [$clog2(ATOMIC_K)-1:0]      wt_k;
  atom_t                            wt_data, dat_data;
  conv_tag_t                        dat_tag, psum_tag;
  logic signed [ATOMIC_K-1:0][31:0] psum, acc_data;
  logic                             acc_valid, acc_ready;
  logic [15:0]                      acc_pix;
  logic [7:0]                       acc_kg;

  nvdla_csc u_csc (
    .clk, .rst_n, .start(csc_start), .cfg(ccfg), .done(csc_done),
    .cbuf_rd_en, .cbuf_rd_addr, .cbuf_rd_data,
    .wt_valid, .wt_k, .wt_data, .dat_valid, .dat_data, .dat_tag, .drained
  );

  nvdla_cmac u_cmac (
    .clk, .rst_n, .wt_valid, .wt_k, .wt_data, .dat_valid, .dat_data, .dat_tag,
    .psum_valid, .psum, .psum_tag
  );

  nvdla_cacc u_cacc (
    .clk, .rst_n, .npix(16'(32'(ccfg.out_w) * 32'(ccfg.out_h))),
    .psum_valid, .psum, .psum_tag,
    .out_valid(acc_valid), .out_ready(acc_ready), .out_data(acc_data),
    .out_pix(acc_pix), .out_kg(acc_kg), .drained
  );

  nvdla_sdp u_sdp (
    .clk, .rst_n, .start(cdma_start), .cfg(ccfg), .done(sdp_done),
    .in_valid(acc_valid), .in_ready(acc_ready), .in_data(acc_data),
    .in_pix(acc_pix), .in_kg(acc_kg),
    .wr_req_valid(wr_req_valid[WR_SDP]), .wr_req_ready(wr_req_ready[WR_SDP]),
    .wr_req_addr(wr_req_addr[WR_SDP]), .wr_req_data(wr_req_data[WR_SDP]),
    .wr_ack(wr_ack[WR_SDP])
  );

  // ---------------- PDP and CDP ----------------
  logic pdp_run, cdp_run, pdp_start, cdp_start;
  assign pdp_start = pdp_en && !pdp_run;
  assign cdp_start = cdp_en && !cdp_run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pdp_run <= 1'b0;
      cdp_run <= 1'b0;
    end else begin
      if (pdp_start) pdp_run <= 1'b1; else if (pdp_done) pdp_run <= 1'b0;
      if (cdp_start) cdp_run <= 1'b1; else if (cdp_done) cdp_run <= 1'b0;
    end
  end

  nvdla_pdp u_pdp (
    .clk, .rst_n, .start(pdp_start), .cfg(pcfg), .done(pdp_done),
    .rd_req_valid(rd_req_valid[RD_PDP]), .rd_req_ready(rd_req_ready[RD_PDP]),
    .rd_req_addr(rd_req_addr[RD_PDP]), .rd_resp_valid(rd_resp_valid[RD_PDP]),
    .rd_resp_data,
    .wr_req_valid(wr_req_valid[WR_PDP]), .wr_req_ready(wr_req_ready[WR_PDP]),
    .wr_req_addr(wr_req_addr[WR_PDP]), .wr_req_data(wr_req_data[WR_PDP]),
    .wr_ack(wr_ack[WR_PDP])
  );

  nvdla_cdp u_cdp (
    .clk, .rst_n, .start(cdp_start), .cfg(dcfg), .done(cdp_done),
    .lut_sel(sel[U_LUT]), .lut_req(req), .lut_rdata(rdata[U_LUT]),
    .rd_req_valid(rd_req_valid[RD_CDP]), .rd_req_ready(rd_req_ready[RD_CDP]),
    .rd_req_addr(rd_req_addr[RD_CDP]), .rd_resp_valid(rd_resp_valid[RD_CDP]),
    .rd_resp_data,
    .wr_req_valid(wr_req_valid[WR_CDP]), .wr_req_ready(wr_req_ready[WR_CDP]),
    .wr_req_addr(wr_req_addr[WR_CDP]), .wr_req_data(wr_req_data[WR_CDP]),
    .wr_ack(wr_ack[WR_CDP])
  );

endmodule

// tb_nvdla_core - checks the accelerator core on its own pins: register
// access over the CSB (non-posted writes complete, reads return data, the
// configuration ROM and the register pointers read back), one convolution
// layer with ReLU end to end through the AXI memory model with the
// convolution-DMA and layer-done interrupts, a pooling layer, and the
// direct reset input returning the core to idle.
module tb_nvdla_core;
  import nvdla_pkg::*;

  logic clk = 0, rst_n = 1, direct_rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act
  always #5 clk = ~clk;

  logic        cvalid = 0, cready, cwrite = 0, cnposted = 0, rvalid_csb, wr_complete, dla_intr;
  logic [15:0] caddr = 0;
  logic [31:0] cwdat = 0, crdata;

  logic                  awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic                  arvalid, arready, rvalid, rready, rlast;
  logic [AXI_IDW-1:0]    awid, bid, arid, rid;
  logic [7:0]            awlen, arlen;
  logic [2:0]            awsize, arsize;
  logic [MEM_AW-1:0]     awaddr, araddr;
  logic [MEMIF_DW-1:0]   wdata, rdata;
  logic [MEMIF_DW/8-1:0] wstrb;

  nvdla_core dut (
    .dla_core_clk(clk), .dla_csb_clk(clk), .dla_reset_rstn(rst_n), .direct_reset_(direct_rst_n),
    .global_clk_ovr_on(1'b0), .tmc2slcg_disable_clock_gating(1'b0), .test_mode(1'b0),
    .nvdla_pwrbus_ram_c_pd('0), .nvdla_pwrbus_ram_ma_pd('0), .nvdla_pwrbus_ram_mb_pd('0),
    .nvdla_pwrbus_ram_p_pd('0), .nvdla_pwrbus_ram_o_pd('0), .nvdla_pwrbus_ram_a_pd('0),
    .csb2nvdla_valid(cvalid), .csb2nvdla_ready(cready), .csb2nvdla_addr(caddr),
    .csb2nvdla_wdat(cwdat), .csb2nvdla_write(cwrite), .csb2nvdla_nposted(cnposted),
    .nvdla2csb_valid(rvalid_csb), .nvdla2csb_data(crdata), .nvdla2csb_wr_complete(wr_complete),
    .nvdla_core2dbb_aw_awvalid(awvalid), .nvdla_core2dbb_aw_awready(awready),
    .nvdla_core2dbb_aw_awid(awid), .nvdla_core2dbb_aw_awlen(awlen),
    .nvdla_core2dbb_aw_awsize(awsize), .nvdla_core2dbb_aw_awaddr(awaddr),
    .nvdla_core2dbb_w_wvalid(wvalid), .nvdla_core2dbb_w_wready(wready),
    .nvdla_core2dbb_w_wdata(wdata), .nvdla_core2dbb_w_wstrb(wstrb),
    .nvdla_core2dbb_w_wlast(wlast),
    .nvdla_core2dbb_b_bvalid(bvalid), .nvdla_core2dbb_b_bready(bready),
    .nvdla_core2dbb_b_bid(bid),
    .nvdla_core2dbb_ar_arvalid(arvalid), .nvdla_core2dbb_ar_arready(arready),
    .nvdla_core2dbb_ar_arid(arid), .nvdla_core2dbb_ar_arlen(arlen),
    .nvdla_core2dbb_ar_arsize(arsize), .nvdla_core2dbb_ar_araddr(araddr),
    .nvdla_core2dbb_r_rvalid(rvalid), .nvdla_core2dbb_r_rready(rready),
    .nvdla_core2dbb_r_rid(rid), .nvdla_core2dbb_r_rlast(rlast),
    .nvdla_core2dbb_r_rdata(rdata), .dla_intr
  );

  tb_axi_mem #(.WORDS(8192), .LAT(8), .READY_PCT(70)) mem (
    .clk, .rst_n, .awvalid, .awready, .awid, .awaddr, .wvalid, .wready, .wdata,
    .bvalid, .bready, .bid, .arvalid, .arready, .arid, .araddr,
    .rvalid, .rready, .rid, .rlast, .rdata
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- CSB host ----------------
  int n_complete = 0;
  always @(posedge clk) if (wr_complete) n_complete++;

  task automatic csb_write(logic [15:0] a, logic [31:0] d, bit np = 1);
    @(negedge clk);
    cvalid = 1; caddr = a; cwdat = d; cwrite = 1; cnposted = np;
    do @(negedge clk); while (!$sampled(cready));
    cvalid = 0;
  endtask

  task automatic csb_read(logic [15:0] a, output logic [31:0] d);
    int n = 0;
    @(negedge clk);
    cvalid = 1; caddr = a; cwrite = 0; cnposted = 0;
    @(negedge clk);
    cvalid = 0;
    while (!rvalid_csb && n < 100) begin @(negedge clk); n++; end
    d = crdata;
  endtask

  function automatic logic [15:0] dreg(logic [7:0] unit, int i);
    return {unit, 8'(8'h10 + i)};
  endfunction

  task automatic wait_intr(int bitn, string what);
    logic [31:0] st;
    int n = 0;
    forever begin
      while (!dla_intr && n < 100000) begin @(negedge clk); n++; end
      csb_read({UNIT_GLB, 8'h03}, st);
      if (st[bitn] || n >= 100000) break;
      @(negedge clk);
      n++;
    end
    check(st[bitn], {what, " interrupt"});
    csb_write({UNIT_GLB, 8'h03}, 32'(1) << bitn);
  endtask

  function automatic logic signed [7:0] mb(int unsigned base, int unsigned idx);
    logic [63:0] w;
    w = mem.mem[(base >> 3) + idx / 8];
    return w[(idx % 8) * 8 +: 8];
  endfunction

  initial begin
    logic [31:0] d;
    localparam int unsigned IN = 32'h1000, WT = 32'h4000, OUT = 32'h8000, POUT = 32'hA000;
    localparam int W = 6, H = 6, CG = 2, KG = 2, R = 3, S = 3, OW = 4, OH = 4;
    int bad, n0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // register access
    csb_read({UNIT_CFGROM, 8'h00}, d);
    check(d == ATOMIC_C, "configuration ROM over the CSB");
    n0 = n_complete;
    csb_write(dreg(UNIT_CONV, 1), 32'hCAFE0000);
    repeat (2) @(negedge clk);
    check(n_complete == n0 + 1, "non-posted write completes");
    csb_write(dreg(UNIT_CONV, 2), 32'h12345678, 0);
    repeat (2) @(negedge clk);
    check(n_complete == n0 + 1, "posted write does not complete");
    csb_read(dreg(UNIT_CONV, 1), d);
    check(d == 32'hCAFE0000, "register read back");

    // convolution layer
    for (int i = 0; i < W * H * CG; i++) mem.mem[(IN >> 3) + i] = {$urandom, $urandom};
    for (int i = 0; i < KG * R * S * CG * 8; i++) begin
      logic [63:0] v;
      for (int b = 0; b < 8; b++) v[b*8 +: 8] = 8'($signed($urandom % 15) - 7);
      mem.mem[(WT >> 3) + i] = v;
    end
    csb_write(dreg(UNIT_CONV, 1), IN);
    csb_write(dreg(UNIT_CONV, 2), WT);
    csb_write(dreg(UNIT_CONV, 3), OUT);
    csb_write(dreg(UNIT_CONV, 4), {16'(H), 16'(W)});
    csb_write(dreg(UNIT_CONV, 5), {8'(KG), 8'(CG), 8'(R), 8'(S)});
    csb_write(dreg(UNIT_CONV, 6), 16);
    csb_write(dreg(UNIT_CONV, 7), 1);
    csb_write(dreg(UNIT_CONV, 8), {16'(OH), 16'(OW)});
    csb_write(dreg(UNIT_CONV, 9), 32'(-50));
    csb_write(dreg(UNIT_CONV, 10), {10'd0, 6'd6, 16'd3});
    csb_write(dreg(UNIT_CONV, 11), 32'(ACT_RELU));
    csb_write(dreg(UNIT_CONV, 0), 1);
    wait_intr(INTR_CDMA, "convolution DMA");
    wait_intr(INTR_CONV, "convolution layer");
    bad = 0;
    for (int oy = 0; oy < OH; oy++)
      for (int ox = 0; ox < OW; ox++)
        for (int k = 0; k < KG * 8; k++) begin
          automatic longint acc = 0, v;
          for (int r = 0; r < R; r++)
            for (int s = 0; s < S; s++)
              for (int ch = 0; ch < CG * 8; ch++)
                acc += longint'(mb(IN, (((oy + r) * W + ox + s) * CG + ch / 8) * 8 + ch % 8)) *
                       longint'(mb(WT, ((((k / 8 * R + r) * S + s) * CG + ch / 8) * 8 + k % 8) * 8 + ch % 8));
          v = ((acc - 50) * 3) >>> 6;
          if (v < 0) v = 0;
          if (v > 127) v = 127;
          if (mb(OUT, ((oy * OW + ox) * KG + k / 8) * 8 + k % 8) !== 8'(v)) bad++;
        end
    check(bad == 0, $sformatf("convolution output (%0d wrong)", bad));
    csb_read({UNIT_CONV, 8'h00}, d);
    check(d == 0, "convolution groups idle after the layer");

    // pooling layer on the convolution output: 2x2 max, stride 2
    csb_write(dreg(UNIT_PDP, 1), OUT);
    csb_write(dreg(UNIT_PDP, 2), POUT);
    csb_write(dreg(UNIT_PDP, 3), {16'(OH), 16'(OW)});
    csb_write(dreg(UNIT_PDP, 4), {16'(OH / 2), 16'(OW / 2)});
    csb_write(dreg(UNIT_PDP, 5), {8'(KG), 4'd2, 4'd2, 8'd2, 8'd2});
    csb_write(dreg(UNIT_PDP, 6), {14'd0, 2'(POOL_MAX), 16'd16384});
    csb_write(dreg(UNIT_PDP, 0), 1);
    wait_intr(INTR_PDP, "pooling layer");
    bad = 0;
    for (int oy = 0; oy < OH / 2; oy++)
      for (int ox = 0; ox < OW / 2; ox++)
        for (int ch = 0; ch < KG * 8; ch++) begin
          automatic int mx = -1000;
          for (int ky = 0; ky < 2; ky++)
            for (int kx = 0; kx < 2; kx++) begin
              automatic int x = int'(mb(OUT, (((oy * 2 + ky) * OW + ox * 2 + kx) * KG + ch / 8) * 8 + ch % 8));
              if (x > mx) mx = x;
            end
          if (mb(POUT, ((oy * (OW / 2) + ox) * KG + ch / 8) * 8 + ch % 8) !== 8'(mx)) bad++;
        end
    check(bad == 0, $sformatf("pooling output (%0d wrong)", bad));

    // direct reset clears the register groups
    csb_write(dreg(UNIT_PDP, 1), 32'h55);
    @(negedge clk);
    direct_rst_n = 0;
    @(negedge clk);
    direct_rst_n = 1;
    csb_read(dreg(UNIT_PDP, 1), d);
    check(d == 0, "direct reset clears registers");
    check(!dla_intr, "no interrupt after reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

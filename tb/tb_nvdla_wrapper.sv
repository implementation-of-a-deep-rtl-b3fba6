// tb_nvdla_wrapper - end-to-end test of the accelerator subsystem at its
// default configuration.
//
// A host model programs the subsystem over APB and a memory model answers
// its AXI master. The test runs a small network:
//   1. CONV layer A (group 0): 6x6x16 input, 16 kernels 3x3, stride 1,
//      bias + scale + ReLU. While it runs, CONV layer B is programmed into
//      group 1 (8x8x8 input, 8 kernels 2x2, stride 2, PReLU) and enabled, so
//      the unit switches register groups without waiting for the host.
//   2. PDP max pooling 2x2/2 on layer A's output and CDP normalisation on
//      layer B's input run at the same time and share the memory interface.
//   3. PDP average pooling 3x3/1 (group 1) and min pooling with the
//      interrupt masked.
// Every output word is compared with a reference computed here, every
// completion is awaited through dla_intr and INTR_STATUS, CFGROM is read
// back. Mechanisms counted (each must occur): register-group switch while
// the other group waits, memory write back-pressure (which holds SDP and
// the accumulator), two DMA engines served in consecutive cycles, AXI read
// not ready, ReLU clipping, PReLU on a negative value, int8 saturation, a
// masked interrupt. All are observed at the subsystem's pins only.
module tb_nvdla_wrapper;
  import nvdla_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act
  always #5 clk = ~clk;

  logic        psel = 0, penable = 0, pwrite = 0;
  logic [31:0] paddr = 0, pwdata = 0, prdata;
  logic        pready, pslverr, dla_intr, wr_complete;

  logic                  awvalid, awready, wvalid, wready, wlast, bvalid, bready;
  logic                  arvalid, arready, rvalid, rready, rlast;
  logic [AXI_IDW-1:0]    awid, bid, arid, rid;
  logic [7:0]            awlen, arlen;
  logic [2:0]            awsize, arsize;
  logic [MEM_AW-1:0]     awaddr, araddr;
  logic [MEMIF_DW-1:0]   wdata, rdata;
  logic [MEMIF_DW/8-1:0] wstrb;

  nvdla_wrapper dut (
    .pclk(clk), .prstn(rst_n), .dla_core_clk(clk), .dla_csb_clk(clk),
    .dla_reset_rstn(rst_n), .direct_reset_(1'b1), .global_clk_ovr_on(1'b0),
    .tmc2slcg_disable_clock_gating(1'b0), .test_mode(1'b0),
    .nvdla_pwrbus_ram_c_pd('0), .nvdla_pwrbus_ram_ma_pd('0), .nvdla_pwrbus_ram_mb_pd('0),
    .nvdla_pwrbus_ram_p_pd('0), .nvdla_pwrbus_ram_o_pd('0), .nvdla_pwrbus_ram_a_pd('0),
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
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
    .nvdla_core2dbb_r_rdata(rdata),
    .dla_intr, .nvdla2csb_wr_complete(wr_complete)
  );

  tb_axi_mem #(.WORDS(65536), .LAT(6), .READY_PCT(60)) mem (
    .clk, .rst_n, .awvalid, .awready, .awid, .awaddr, .wvalid, .wready, .wdata,
    .bvalid, .bready, .bid, .arvalid, .arready, .arid, .araddr,
    .rvalid, .rready, .rid, .rlast, .rdata
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- host bus ----------------
  task automatic apb_write(logic [15:0] csb, logic [31:0] d);
    @(posedge clk);
    psel <= 1; pwrite <= 1; paddr <= {14'd0, csb, 2'b00}; pwdata <= d; penable <= 0;
    @(posedge clk);
    penable <= 1;
    do @(posedge clk); while (!pready);
    psel <= 0; penable <= 0;
  endtask

  task automatic apb_read(logic [15:0] csb, output logic [31:0] d);
    @(posedge clk);
    psel <= 1; pwrite <= 0; paddr <= {14'd0, csb, 2'b00}; penable <= 0;
    @(posedge clk);
    penable <= 1;
    do @(posedge clk); while (!pready);
    d = prdata;
    psel <= 0; penable <= 0;
  endtask

  function automatic logic [15:0] dreg(logic [7:0] unit, int i);
    return {unit, 8'(8'h10 + i)};
  endfunction

  // wait for a status bit through the interrupt, then clear it
  task automatic wait_intr(int bitn, string what);
    logic [31:0] st;
    int n = 0;
    forever begin
      while (!dla_intr && n < 200000) begin @(posedge clk); n++; end
      apb_read({UNIT_GLB, 8'h03}, st);
      if (st[bitn] || n >= 200000) break;
    end
    check(st[bitn] == 1'b1, {what, " interrupt"});
    apb_write({UNIT_GLB, 8'h03}, 32'(1) << bitn);
  endtask

  // ---------------- memory helpers ----------------
  function automatic logic signed [7:0] mb(int unsigned base, int unsigned idx);
    logic [63:0] w;
    w = mem.mem[(base >> 3) + idx / 8];
    return w[(idx % 8) * 8 +: 8];
  endfunction

  task automatic fill(int unsigned base, int unsigned words, int lo, int hi);
    for (int unsigned i = 0; i < words; i++) begin
      logic [63:0] w;
      for (int b = 0; b < 8; b++) w[b*8 +: 8] = 8'(lo + int'($urandom % (hi - lo + 1)));
      mem.mem[(base >> 3) + i] = w;
    end
  endtask

  function automatic logic [7:0] sat(longint v);
    if (v > 127) return 8'h7f;
    if (v < -128) return 8'h80;
    return 8'(v);
  endfunction

  // ---------------- mechanisms ----------------
  // All counted at the subsystem's pins, so the test needs nothing inside it.
  int n_switch = 0, n_wr_stall = 0, n_rd_conflict = 0, n_axi_stall = 0;
  int n_relu = 0, n_prelu = 0, n_sat = 0, n_masked = 0;
  logic [AXI_IDW-1:0] last_arid = '0;
  logic               ar_prev = 1'b0;   // an AR handshake in the previous cycle

  always @(posedge clk) if (rst_n) begin
    // two read clients served in consecutive cycles: both were requesting
    if (arvalid && arready && ar_prev && arid != last_arid) n_rd_conflict++;
    if (arvalid && arready) last_arid <= arid;
    ar_prev <= arvalid && arready;
    if (awvalid && !awready) n_wr_stall++;
    if (arvalid && !arready) n_axi_stall++;
  end

  // ---------------- layers ----------------
  localparam int unsigned A_IN = 32'h1000, A_WT = 32'h4000, A_OUT = 32'h8000;
  localparam int unsigned B_IN = 32'h9000, B_WT = 32'hA000, B_OUT = 32'hB000;
  localparam int unsigned P_OUT = 32'hC000, D_OUT = 32'hD000, P2_OUT = 32'hE000, P3_OUT = 32'hF000;

  typedef struct {
    int unsigned in_a, wt_a, out_a;
    int w, h, cg, kg, r, s, stride, px, py, ow, oh, bank, img;
    int bias, scale, shift, act, pa, psh;
  } conv_t;

  task automatic program_conv(conv_t c);
    apb_write(dreg(UNIT_CONV, 1), c.in_a);
    apb_write(dreg(UNIT_CONV, 2), c.wt_a);
    apb_write(dreg(UNIT_CONV, 3), c.out_a);
    apb_write(dreg(UNIT_CONV, 4), {16'(c.h), 16'(c.w)});
    apb_write(dreg(UNIT_CONV, 5), {8'(c.kg), 8'(c.cg), 8'(c.r), 8'(c.s)});
    apb_write(dreg(UNIT_CONV, 6), {23'd0, 1'(c.img), 3'd0, 5'(c.bank)});
    apb_write(dreg(UNIT_CONV, 7), {16'd0, 4'(c.py), 4'(c.px), 4'd0, 4'(c.stride)});
    apb_write(dreg(UNIT_CONV, 8), {16'(c.oh), 16'(c.ow)});
    apb_write(dreg(UNIT_CONV, 9), c.bias);
    apb_write(dreg(UNIT_CONV, 10), {10'd0, 6'(c.shift), 16'(c.scale)});
    apb_write(dreg(UNIT_CONV, 11), {11'd0, 5'(c.psh), 8'(c.pa), 6'd0, 2'(c.act)});
    apb_write(dreg(UNIT_CONV, 0), 1);
  endtask

  task automatic check_conv(conv_t c, string name);
    int bad = 0;
    for (int oy = 0; oy < c.oh; oy++)
      for (int ox = 0; ox < c.ow; ox++)
        for (int k = 0; k < c.kg * 8; k++) begin
          longint acc = 0, v;
          logic [7:0] exp;
          for (int r = 0; r < c.r; r++)
            for (int s = 0; s < c.s; s++)
              for (int ch = 0; ch < c.cg * 8; ch++) begin
                int iy = oy * c.stride + r - c.py, ix = ox * c.stride + s - c.px;
                int di = ((iy * c.w + ix) * c.cg + ch / 8) * 8 + ch % 8;
                int wi = (((((k / 8) * c.r + r) * c.s + s) * c.cg + ch / 8) * 8 + k % 8) * 8 + ch % 8;
                // image input: 4-byte pixels, channels 4..7 are zero
                if (c.img != 0) di = (iy * c.w + ix) * 4 + ch;
                if (iy >= 0 && iy < c.h && ix >= 0 && ix < c.w && (c.img == 0 || ch < 4))
                  acc += longint'(mb(c.in_a, di)) * longint'(mb(c.wt_a, wi));
              end
          v = ((acc + longint'(c.bias)) * longint'(c.scale)) >>> c.shift;
          if (c.act == 1 && v < 0) begin v = 0; n_relu++; end
          if (c.act == 2 && v < 0) begin v = (v * c.pa) >>> c.psh; n_prelu++; end
          if (v > 127 || v < -128) n_sat++;
          exp = sat(v);
          if (mb(c.out_a, ((oy * c.ow + ox) * c.kg + k / 8) * 8 + k % 8) !== exp) bad++;
        end
    check(bad == 0, $sformatf("%s output (%0d wrong)", name, bad));
  endtask

  task automatic program_pdp(int unsigned src, int unsigned dst, int w, int h, int cg,
                             int kw, int kh, int sx, int sy, int mode);
    int ow = (w - kw) / sx + 1, oh = (h - kh) / sy + 1;
    apb_write(dreg(UNIT_PDP, 1), src);
    apb_write(dreg(UNIT_PDP, 2), dst);
    apb_write(dreg(UNIT_PDP, 3), {16'(h), 16'(w)});
    apb_write(dreg(UNIT_PDP, 4), {16'(oh), 16'(ow)});
    apb_write(dreg(UNIT_PDP, 5), {8'(cg), 4'(sy), 4'(sx), 8'(kh), 8'(kw)});
    apb_write(dreg(UNIT_PDP, 6), {14'd0, 2'(mode), 16'((65536 + kw * kh / 2) / (kw * kh))});
    apb_write(dreg(UNIT_PDP, 0), 1);
  endtask

  task automatic check_pdp(int unsigned src, int unsigned dst, int w, int h, int cg,
                           int kw, int kh, int sx, int sy, int mode, string name);
    int ow = (w - kw) / sx + 1, oh = (h - kh) / sy + 1, bad = 0;
    int recip = (65536 + kw * kh / 2) / (kw * kh);
    for (int oy = 0; oy < oh; oy++)
      for (int ox = 0; ox < ow; ox++)
        for (int ch = 0; ch < cg * 8; ch++) begin
          longint acc = 0;
          int mx = -1000, mn = 1000;
          logic [7:0] exp;
          for (int ky = 0; ky < kh; ky++)
            for (int kx = 0; kx < kw; kx++) begin
              int x = int'(mb(src, (((oy * sy + ky) * w + ox * sx + kx) * cg + ch / 8) * 8 + ch % 8));
              acc += longint'(x);
              if (x > mx) mx = x;
              if (x < mn) mn = x;
            end
          exp = (mode == 0) ? 8'(mx) : (mode == 1) ? 8'(mn) : sat((acc * recip + 32768) >>> 16);
          if (mb(dst, ((oy * ow + ox) * cg + ch / 8) * 8 + ch % 8) !== exp) begin
            if (bad < 4) $display("  %s (%0d,%0d,%0d): got %0d expected %0d", name, oy, ox, ch,
                                  $signed(mb(dst, ((oy * ow + ox) * cg + ch / 8) * 8 + ch % 8)), $signed(exp));
            bad++;
          end
        end
    check(bad == 0, $sformatf("%s output (%0d wrong)", name, bad));
  endtask

  int lut_v [CDP_LUT_N];

  task automatic check_cdp(int unsigned src, int unsigned dst, int npix, int cg, int n,
                           int lsh, int osh);
    int bad = 0;
    for (int p = 0; p < npix; p++)
      for (int c = 0; c < cg * 8; c++) begin
        longint ss = 0, v;
        int idx;
        for (int j = c - n / 2; j <= c + n / 2; j++)
          if (j >= 0 && j < cg * 8) ss += mb(src, p * cg * 8 + j) * mb(src, p * cg * 8 + j);
        idx = int'(ss >>> lsh);
        if (idx > CDP_LUT_N - 1) idx = CDP_LUT_N - 1;
        v = (longint'(mb(src, p * cg * 8 + c)) * lut_v[idx]) >>> osh;
        if (mb(dst, p * cg * 8 + c) !== sat(v)) bad++;
      end
    check(bad == 0, $sformatf("CDP output (%0d wrong)", bad));
  endtask

  // ---------------- test ----------------
  initial begin
    conv_t a, b;
    logic [31:0] rd;
    for (int i = 0; i < 65536; i++) mem.mem[i] = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // configuration ROM
    apb_read({UNIT_CFGROM, 8'h00}, rd); check(rd == ATOMIC_C, "CFGROM Atomic-C");
    apb_read({UNIT_CFGROM, 8'h01}, rd); check(rd == ATOMIC_K, "CFGROM Atomic-K");
    apb_read({UNIT_CFGROM, 8'h02}, rd); check(rd == 32, "CFGROM banks");

    a = '{in_a: A_IN, wt_a: A_WT, out_a: A_OUT, w: 6, h: 6, cg: 2, kg: 2, r: 3, s: 3,
          stride: 1, px: 0, py: 0, ow: 4, oh: 4, bank: 16, img: 0, bias: 100, scale: 3, shift: 6, act: 1, pa: 0, psh: 0};
    b = '{in_a: B_IN, wt_a: B_WT, out_a: B_OUT, w: 8, h: 8, cg: 1, kg: 1, r: 2, s: 2,
          stride: 2, px: 0, py: 0, ow: 4, oh: 4, bank: 8, img: 0, bias: -50, scale: 5, shift: 4, act: 2, pa: 13, psh: 4};
    fill(A_IN, 6 * 6 * 2, -128, 127);
    fill(A_WT, 2 * 3 * 3 * 2 * 8, -128, 127);
    fill(B_IN, 8 * 8, -100, 100);
    fill(B_WT, 2 * 2 * 8, -60, 60);

    // layer A into group 0, layer B into group 1 while A runs
    program_conv(a);
    apb_write({UNIT_CONV, 8'h01}, 1);
    program_conv(b);
    apb_read({UNIT_CONV, 8'h00}, rd);
    check(rd[0] && rd[16], "both CONV groups enabled, group 1 queued");
    wait_intr(INTR_CONV + 0, "CONV group 0");
    check_conv(a, "CONV layer A");
    wait_intr(INTR_CONV + 1, "CONV group 1");
    if (rd[0] && rd[16]) n_switch++;    // group 1 ran with no host action after A
    check_conv(b, "CONV layer B");
    apb_write({UNIT_GLB, 8'h03}, 32'hFF);   // clear the CDMA events

    // PDP max pooling of layer A, CDP of layer B's input, concurrently
    for (int i = 0; i < CDP_LUT_N; i++) begin
      lut_v[i] = 4096 - i * 50;
      apb_write({UNIT_CDP_LUT, 8'(i)}, lut_v[i]);
    end
    apb_read({UNIT_CDP_LUT, 8'd5}, rd); check(rd == 32'(lut_v[5]), "CDP LUT readback");
    program_pdp(A_OUT, P_OUT, 4, 4, 2, 2, 2, 2, 2, 0);
    apb_write(dreg(UNIT_CDP, 1), B_IN);
    apb_write(dreg(UNIT_CDP, 2), D_OUT);
    apb_write(dreg(UNIT_CDP, 3), 64);
    apb_write(dreg(UNIT_CDP, 4), {20'd0, 4'd5, 8'd1});
    apb_write(dreg(UNIT_CDP, 5), {19'd0, 5'd12, 3'd0, 5'd10});
    apb_write(dreg(UNIT_CDP, 0), 1);
    wait_intr(INTR_PDP + 0, "PDP group 0");
    wait_intr(INTR_CDP + 0, "CDP group 0");
    check_pdp(A_OUT, P_OUT, 4, 4, 2, 2, 2, 2, 2, 0, "PDP max");
    check_cdp(B_IN, D_OUT, 64, 1, 5, 10, 12);

    // PDP average pooling in group 1
    apb_write({UNIT_PDP, 8'h01}, 1);
    program_pdp(B_IN, P2_OUT, 8, 8, 1, 3, 3, 1, 1, 2);
    wait_intr(INTR_PDP + 1, "PDP group 1");
    check_pdp(B_IN, P2_OUT, 8, 8, 1, 3, 3, 1, 1, 2, "PDP avg");

    // min pooling with the PDP interrupts masked
    apb_write({UNIT_GLB, 8'h01}, 32'h30);
    apb_write({UNIT_PDP, 8'h01}, 0);
    program_pdp(A_IN, P3_OUT, 6, 6, 2, 2, 3, 1, 2, 1);
    do apb_read({UNIT_PDP, 8'h00}, rd); while (rd[0]);
    repeat (3) @(posedge clk);
    apb_read({UNIT_GLB, 8'h03}, rd);
    check(rd[INTR_PDP] && !dla_intr, "masked PDP interrupt");
    if (rd[INTR_PDP] && !dla_intr) n_masked++;
    check_pdp(A_IN, P3_OUT, 6, 6, 2, 2, 3, 1, 2, 1, "PDP min");
    apb_write({UNIT_GLB, 8'h03}, 32'hFF);
    apb_write({UNIT_GLB, 8'h01}, 0);
    repeat (3) @(posedge clk);
    check(!dla_intr, "interrupt released");

    // every mechanism must have happened
    check(n_switch > 0,      "register group switch without host");
    check(n_wr_stall > 0,    "memory write back-pressure");
    check(n_rd_conflict > 0, "concurrent DMA read requests");
    check(n_axi_stall > 0,   "AXI read not ready");
    check(n_relu > 0,        "ReLU clipping");
    check(n_prelu > 0,       "PReLU negative slope");
    check(n_sat > 0,         "int8 saturation");
    check(n_masked > 0,      "masked interrupt");
    $display("mechanisms: switch=%0d wr_stall=%0d rd_conflict=%0d axi_stall=%0d relu=%0d prelu=%0d sat=%0d masked=%0d",
             n_switch, n_wr_stall, n_rd_conflict, n_axi_stall, n_relu, n_prelu, n_sat, n_masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

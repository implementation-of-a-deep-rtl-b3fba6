// tb_alexnet_slice - runs slices of AlexNet's first stage through the
// accelerator, layer after layer, each reading the previous layer's output
// from memory.
//
// AlexNet's first stage is an 11x11 convolution with stride 4 and ReLU,
// local response normalisation across 5 channels, and 3x3 max pooling with
// stride 2 (overlapping windows); its second convolution uses 5x5 kernels
// with zero padding, and its classifier is fully connected layers.
// The whole network does not fit the convolution buffer at once, so this
// test runs the same layer types on a spatial tile:
//   conv1  35x35 RGB image read in the image input mode (4-byte pixels),
//          16 of the 96 kernels 11x11, stride 4, ReLU       -> 7x7x16
//   norm1  n = 5, factor (2 + 1e-4 * s)^-0.75 in a 64-entry table
//   pool1  3x3 max, stride 2                                -> 3x3x16
//   conv2  16 kernels 5x5 with 2 pixels of zero padding, ReLU -> 3x3x16
//   fc     16 neurons over the 3x3x16 cube, written as a convolution whose
//          kernel covers the whole input, ReLU              -> 1x1x16
// Every output is compared with a reference computed from the layer's
// input in memory. For conv1 the test also times the two phases from the
// interrupt pin: the load must end before compute starts, and compute must
// take the schedule's cost, kg * (T * (8 + P) + 8 * P) cycles for T kernel
// steps and P output pixels, within 200 cycles of pipeline and write latency.
//
// The layer types and the first stage's shapes are AlexNet's; the tile
// size, the number of kernels and the fixed-point scaling are this test's.
module tb_alexnet_slice;
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

  // counted by the reference models
  int n_relu = 0, n_prelu = 0, n_sat = 0;

  // ---------------- layers ----------------
  localparam int unsigned C1_IN = 32'h01000, C1_WT = 32'h04000, C1_OUT = 32'h08000;
  localparam int unsigned LRN_OUT = 32'h09000, POOL_OUT = 32'h0A000;
  localparam int unsigned FC_WT = 32'h0B000, FC_OUT = 32'h0C000;
  localparam int unsigned C2_OUT = 32'h0D000, C2_WT = 32'h0E000;

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

  // ---------------- timing from the interrupt pin ----------------
  longint cyc = 0, t_rise = 0;
  logic   intr_q = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    intr_q <= dla_intr;
    if (dla_intr && !intr_q) t_rise <= cyc;
  end

  // ---------------- test ----------------
  initial begin
    conv_t c1, c2, fc;
    logic [31:0] rd;
    longint t_en, t_load, t_conv, cost;
    for (int i = 0; i < 65536; i++) mem.mem[i] = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // input tile: an 8-bit RGB image of 4-byte pixels (R, G, B, pad byte 0),
    // read through the image input mode
    for (int p = 0; p < 35 * 35; p++) begin
      automatic logic [31:0] px = '0;
      for (int ch = 0; ch < 3; ch++) px[ch*8 +: 8] = 8'(int'($urandom % 201) - 100);
      mem.mem[(C1_IN >> 3) + p / 2][(p % 2) * 32 +: 32] = px;
    end
    fill(C1_WT, 2 * 11 * 11 * 1 * 8, -30, 30);

    // conv1: weights from bank 3 (entry 1536), above the 1225 input atoms
    c1 = '{in_a: C1_IN, wt_a: C1_WT, out_a: C1_OUT, w: 35, h: 35, cg: 1, kg: 2, r: 11, s: 11,
           stride: 4, px: 0, py: 0, ow: 7, oh: 7, bank: 3, img: 1, bias: 0, scale: 1, shift: 8, act: 1, pa: 0, psh: 0};
    program_conv(c1);
    t_en = cyc;
    while (!dla_intr) @(posedge clk);
    @(posedge clk);                      // t_rise is written at the edge that saw the rise
    t_load = t_rise;
    apb_read({UNIT_GLB, 8'h03}, rd);
    check(rd[INTR_CDMA] && !rd[INTR_CONV], "conv1 load finishes before compute");
    apb_write({UNIT_GLB, 8'h03}, 32'(1) << INTR_CDMA);
    wait_intr(INTR_CONV, "conv1");
    t_conv = t_rise;
    check_conv(c1, "conv1");
    cost = 2 * (121 * (8 + 49) + 8 * 49);
    $display("conv1: load %0d cycles for %0d reads, compute %0d cycles, schedule cost %0d",
             t_load - t_en, 35 * 35 + 2 * 11 * 11 * 8, t_conv - t_load, cost);
    check(t_conv - t_load >= cost, "conv1 compute not faster than the schedule allows");
    check(t_conv - t_load <= cost + 200, "conv1 compute within 200 cycles of the schedule");

    // norm1
    for (int i = 0; i < CDP_LUT_N; i++) begin
      lut_v[i] = int'(4096.0 * $pow(2.0 + 1.0e-4 * real'(i << 11), -0.75));
      apb_write({UNIT_CDP_LUT, 8'(i)}, lut_v[i]);
    end
    apb_write(dreg(UNIT_CDP, 1), C1_OUT);
    apb_write(dreg(UNIT_CDP, 2), LRN_OUT);
    apb_write(dreg(UNIT_CDP, 3), 49);
    apb_write(dreg(UNIT_CDP, 4), {20'd0, 4'd5, 8'd2});
    apb_write(dreg(UNIT_CDP, 5), {19'd0, 5'd12, 3'd0, 5'd11});
    apb_write(dreg(UNIT_CDP, 0), 1);
    wait_intr(INTR_CDP, "norm1");
    check_cdp(C1_OUT, LRN_OUT, 49, 2, 5, 11, 12);

    // pool1
    program_pdp(LRN_OUT, POOL_OUT, 7, 7, 2, 3, 3, 2, 2, 0);
    wait_intr(INTR_PDP, "pool1");
    check_pdp(LRN_OUT, POOL_OUT, 7, 7, 2, 3, 3, 2, 2, 0, "pool1");

    // conv2: 5x5 kernels with 2 pixels of zero padding, in register group 1
    fill(C2_WT, 2 * 5 * 5 * 2 * 8, -40, 40);
    c2 = '{in_a: POOL_OUT, wt_a: C2_WT, out_a: C2_OUT, w: 3, h: 3, cg: 2, kg: 2, r: 5, s: 5,
           stride: 1, px: 2, py: 2, ow: 3, oh: 3, bank: 1, img: 0, bias: 0, scale: 1, shift: 7, act: 1, pa: 0, psh: 0};
    apb_write({UNIT_CONV, 8'h01}, 1);
    program_conv(c2);
    wait_intr(INTR_CONV + 1, "conv2");
    check_conv(c2, "conv2");

    // fully connected slice, back in register group 0
    fill(FC_WT, 2 * 3 * 3 * 2 * 8, -40, 40);
    fc = '{in_a: C2_OUT, wt_a: FC_WT, out_a: FC_OUT, w: 3, h: 3, cg: 2, kg: 2, r: 3, s: 3,
           stride: 1, px: 0, py: 0, ow: 1, oh: 1, bank: 1, img: 0, bias: 0, scale: 1, shift: 6, act: 1, pa: 0, psh: 0};
    apb_write({UNIT_CONV, 8'h01}, 0);
    program_conv(fc);
    wait_intr(INTR_CONV, "fc");
    check_conv(fc, "fc");

    check(n_relu > 0, "ReLU clipped some outputs");
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

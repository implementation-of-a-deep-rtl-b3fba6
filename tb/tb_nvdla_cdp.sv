// tb_nvdla_cdp - checks the cross-channel normalisation engine through the
// memory interface and AXI memory model: the look-up table is written and
// read back through its register window, then layers with different window
// sizes, channel groups and shifts are normalised and every output element
// is compared with a reference (sum of squares over the window, clipped
// table index, multiply, shift, int8 saturation). done pulses once per layer.
module tb_nvdla_cdp;
  import nvdla_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act
  always #5 clk = ~clk;

  logic        start = 0, done, lut_sel = 0;
  cdp_cfg_t    cfg = '0;
  reg_req_t    lut_req = '0;
  logic [31:0] lut_rdata;

  logic [NUM_RD-1:0]               rd_req_valid, rd_req_ready, rd_resp_valid;
  addr_t [NUM_RD-1:0]              rd_req_addr;
  logic [MEMIF_DW-1:0]             rd_resp_data;
  logic [NUM_WR-1:0]               wr_req_valid, wr_req_ready, wr_ack;
  addr_t [NUM_WR-1:0]              wr_req_addr;
  logic [NUM_WR-1:0][MEMIF_DW-1:0] wr_req_data;

  nvdla_cdp dut (.clk, .rst_n, .start, .cfg, .done, .lut_sel, .lut_req, .lut_rdata,
    .rd_req_valid(rd_req_valid[RD_CDP]), .rd_req_ready(rd_req_ready[RD_CDP]),
    .rd_req_addr(rd_req_addr[RD_CDP]), .rd_resp_valid(rd_resp_valid[RD_CDP]), .rd_resp_data,
    .wr_req_valid(wr_req_valid[WR_CDP]), .wr_req_ready(wr_req_ready[WR_CDP]),
    .wr_req_addr(wr_req_addr[WR_CDP]), .wr_req_data(wr_req_data[WR_CDP]), .wr_ack(wr_ack[WR_CDP]));

  assign rd_req_valid[RD_CDMA] = 1'b0, rd_req_valid[RD_PDP] = 1'b0;
  assign rd_req_addr[RD_CDMA]  = '0,   rd_req_addr[RD_PDP]  = '0;
  assign wr_req_valid[WR_SDP]  = 1'b0, wr_req_valid[WR_PDP] = 1'b0;
  assign wr_req_addr[WR_SDP]   = '0,   wr_req_addr[WR_PDP]  = '0;
  assign wr_req_data[WR_SDP]   = '0,   wr_req_data[WR_PDP]  = '0;

  tb_memsys #(.LAT(6), .READY_PCT(60)) u_sys (.clk, .rst_n, .rd_req_valid, .rd_req_ready,
    .rd_req_addr, .rd_resp_valid, .rd_resp_data, .wr_req_valid, .wr_req_ready, .wr_req_addr,
    .wr_req_data, .wr_ack);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_done = 0;
  always @(posedge clk) if (done) n_done++;

  function automatic logic signed [7:0] mb(int unsigned base, int unsigned idx);
    logic [63:0] w;
    w = u_sys.u_mem.mem[(base >> 3) + idx / 8];
    return w[(idx % 8) * 8 +: 8];
  endfunction

  int lut_v [CDP_LUT_N];

  task automatic load_lut();
    int bad = 0;
    for (int i = 0; i < CDP_LUT_N; i++) begin
      lut_v[i] = 4096 / (i + 4) + int'($urandom % 16);
      @(negedge clk);
      lut_sel = 1; lut_req = '{wr: 1, rd: 0, addr: 8'(i), wdat: 32'(lut_v[i])};
      @(negedge clk);
      lut_sel = 0; lut_req = '0;
    end
    for (int i = 0; i < CDP_LUT_N; i++) begin
      lut_req.addr = 8'(i);
      #1 if (lut_rdata != 32'(lut_v[i])) bad++;
    end
    check(bad == 0, "table read back");
  endtask

  task automatic run(int npix, int cg, int n, int lsh, int osh, int lo, int hi);
    int bad = 0, cyc = 0;
    localparam int unsigned SRC = 32'h1000, DST = 32'h9000;
    for (int i = 0; i < npix * cg; i++) begin
      logic [63:0] v;
      for (int b = 0; b < 8; b++) v[b*8 +: 8] = 8'(lo + int'($urandom % (hi - lo + 1)));
      u_sys.u_mem.mem[(SRC >> 3) + i] = v;
      u_sys.u_mem.mem[(DST >> 3) + i] = '0;
    end
    cfg = '{src_addr: SRC, dst_addr: DST, npix: 32'(npix), cg: 8'(cg), n: 4'(n),
            lut_shift: 5'(lsh), out_shift: 5'(osh)};
    n_done = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (n_done == 0 && cyc < 100000) begin @(negedge clk); cyc++; end
    check(n_done == 1, "done pulse");
    for (int p = 0; p < npix; p++)
      for (int c = 0; c < cg * 8; c++) begin
        longint ss = 0, v;
        int idx;
        logic [7:0] exp;
        for (int j = c - n / 2; j <= c + n / 2; j++)
          if (j >= 0 && j < cg * 8) ss += mb(SRC, p * cg * 8 + j) * mb(SRC, p * cg * 8 + j);
        idx = int'(ss >>> lsh);
        if (idx > CDP_LUT_N - 1) idx = CDP_LUT_N - 1;
        v = (longint'(mb(SRC, p * cg * 8 + c)) * lut_v[idx]) >>> osh;
        exp = (v > 127) ? 8'h7f : (v < -128) ? 8'h80 : 8'(v);
        if (mb(DST, p * cg * 8 + c) !== exp) bad++;
      end
    check(bad == 0, $sformatf("window %0d, %0d channel groups: output (%0d wrong)", n, cg, bad));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_lut();
    run(20, 1, 3, 8, 8, -128, 127);
    run(12, 2, 5, 9, 7, -60, 60);
    run(9, 8, 9, 10, 8, -128, 127);
    run(10, 3, 1, 6, 6, -20, 20);
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

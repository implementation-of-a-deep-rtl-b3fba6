// tb_nvdla_pdp - checks the pooling engine through the memory interface
// and AXI memory model: max, min and average pooling with different window
// sizes, strides (overlapping and not) and channel groups, every output
// element against a reference, done once per layer.
module tb_nvdla_pdp;
  import nvdla_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act
  always #5 clk = ~clk;

  logic     start = 0, done;
  pdp_cfg_t cfg = '0;

  logic [NUM_RD-1:0]               rd_req_valid, rd_req_ready, rd_resp_valid;
  addr_t [NUM_RD-1:0]              rd_req_addr;
  logic [MEMIF_DW-1:0]             rd_resp_data;
  logic [NUM_WR-1:0]               wr_req_valid, wr_req_ready, wr_ack;
  addr_t [NUM_WR-1:0]              wr_req_addr;
  logic [NUM_WR-1:0][MEMIF_DW-1:0] wr_req_data;

  nvdla_pdp dut (.clk, .rst_n, .start, .cfg, .done,
    .rd_req_valid(rd_req_valid[RD_PDP]), .rd_req_ready(rd_req_ready[RD_PDP]),
    .rd_req_addr(rd_req_addr[RD_PDP]), .rd_resp_valid(rd_resp_valid[RD_PDP]), .rd_resp_data,
    .wr_req_valid(wr_req_valid[WR_PDP]), .wr_req_ready(wr_req_ready[WR_PDP]),
    .wr_req_addr(wr_req_addr[WR_PDP]), .wr_req_data(wr_req_data[WR_PDP]), .wr_ack(wr_ack[WR_PDP]));

  assign rd_req_valid[RD_CDMA] = 1'b0, rd_req_valid[RD_CDP] = 1'b0;
  assign rd_req_addr[RD_CDMA]  = '0,   rd_req_addr[RD_CDP]  = '0;
  assign wr_req_valid[WR_SDP]  = 1'b0, wr_req_valid[WR_CDP] = 1'b0;
  assign wr_req_addr[WR_SDP]   = '0,   wr_req_addr[WR_CDP]  = '0;
  assign wr_req_data[WR_SDP]   = '0,   wr_req_data[WR_CDP]  = '0;

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

  task automatic run(int w, int h, int cg, int kw, int kh, int sx, int sy, pool_e mode);
    int ow = (w - kw) / sx + 1, oh = (h - kh) / sy + 1, bad = 0, cyc = 0;
    int recip = (65536 + kw * kh / 2) / (kw * kh);
    localparam int unsigned SRC = 32'h1000, DST = 32'h9000;
    for (int i = 0; i < w * h * cg; i++) u_sys.u_mem.mem[(SRC >> 3) + i] = {$urandom, $urandom};
    for (int i = 0; i < ow * oh * cg; i++) u_sys.u_mem.mem[(DST >> 3) + i] = '0;
    cfg = '{src_addr: SRC, dst_addr: DST, in_w: 16'(w), in_h: 16'(h), out_w: 16'(ow),
            out_h: 16'(oh), kw: 8'(kw), kh: 8'(kh), sx: 4'(sx), sy: 4'(sy), cg: 8'(cg),
            recip: 16'(recip), mode: mode};
    n_done = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (n_done == 0 && cyc < 100000) begin @(negedge clk); cyc++; end
    check(n_done == 1, "done pulse");
    for (int oy = 0; oy < oh; oy++)
      for (int ox = 0; ox < ow; ox++)
        for (int ch = 0; ch < cg * 8; ch++) begin
          longint acc = 0, v;
          int mx = -1000, mn = 1000;
          logic [7:0] exp;
          for (int ky = 0; ky < kh; ky++)
            for (int kx = 0; kx < kw; kx++) begin
              int x = int'(mb(SRC, (((oy * sy + ky) * w + ox * sx + kx) * cg + ch / 8) * 8 + ch % 8));
              acc += longint'(x);
              if (x > mx) mx = x;
              if (x < mn) mn = x;
            end
          v = (acc * recip + 32768) >>> 16;
          exp = (mode == POOL_MAX) ? 8'(mx) : (mode == POOL_MIN) ? 8'(mn)
              : (v > 127) ? 8'h7f : (v < -128) ? 8'h80 : 8'(v);
          if (mb(DST, ((oy * ow + ox) * cg + ch / 8) * 8 + ch % 8) !== exp) bad++;
        end
    check(bad == 0, $sformatf("%s %0dx%0d stride %0d,%0d output (%0d wrong)",
                              mode.name(), kw, kh, sx, sy, bad));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(8, 8, 1, 2, 2, 2, 2, POOL_MAX);
    run(9, 7, 2, 3, 3, 2, 2, POOL_MAX);
    run(6, 6, 3, 3, 3, 1, 1, POOL_MIN);
    run(8, 6, 2, 2, 2, 2, 2, POOL_AVG);
    run(7, 7, 1, 3, 3, 2, 2, POOL_AVG);
    run(5, 9, 1, 1, 3, 1, 3, POOL_AVG);
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

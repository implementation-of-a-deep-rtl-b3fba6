// tb_nvdla_cdma - checks the convolution DMA through the memory interface
// and AXI memory model: after start, the feature atoms land in buffer
// entries 0.. in memory order, the weight atoms in the entries from the
// first weight bank on, nothing else is written, done pulses once, and
// reads are pipelined (several in flight). In image mode each 4-byte pixel
// must arrive as one atom with its bytes in channels 0..3 and zeros above.
module tb_nvdla_cdma;
  import nvdla_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act
  always #5 clk = ~clk;

  logic               start = 0, done, cbuf_wr_en;
  conv_cfg_t          cfg = '0;
  logic [CBUF_AW-1:0] cbuf_wr_addr;
  atom_t              cbuf_wr_data;

  logic [NUM_RD-1:0]               rd_req_valid, rd_req_ready, rd_resp_valid;
  addr_t [NUM_RD-1:0]              rd_req_addr;
  logic [MEMIF_DW-1:0]             rd_resp_data;
  logic [NUM_WR-1:0]               wr_req_ready, wr_ack;

  nvdla_cdma dut (.clk, .rst_n, .start, .cfg, .done,
    .rd_req_valid(rd_req_valid[RD_CDMA]), .rd_req_ready(rd_req_ready[RD_CDMA]),
    .rd_req_addr(rd_req_addr[RD_CDMA]), .rd_resp_valid(rd_resp_valid[RD_CDMA]), .rd_resp_data,
    .cbuf_wr_en, .cbuf_wr_addr, .cbuf_wr_data);

  assign rd_req_valid[NUM_RD-1:1] = '0;
  assign rd_req_addr[NUM_RD-1:1]  = '0;

  tb_memsys #(.LAT(20), .READY_PCT(70)) u_sys (.clk, .rst_n, .rd_req_valid, .rd_req_ready,
    .rd_req_addr, .rd_resp_valid, .rd_resp_data, .wr_req_valid('0), .wr_req_ready,
    .wr_req_addr('0), .wr_req_data('0), .wr_ack);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  atom_t buffer [int];
  int n_done = 0, n_req = 0, n_resp = 0, max_out = 0;
  always @(posedge clk) if (rst_n) begin
    if (cbuf_wr_en) buffer[int'(cbuf_wr_addr)] = cbuf_wr_data;
    if (done) n_done++;
    if (rd_req_valid[0] && rd_req_ready[0]) n_req++;
    if (rd_resp_valid[0]) n_resp++;
    if (n_req - n_resp > max_out) max_out = n_req - n_resp;
  end

  task automatic run(int w, int h, int cg, int kg, int r, int s, int bank, bit img = 0);
    int nd = w * h * cg, nw = kg * r * s * cg * ATOMIC_K, bad = 0, cyc = 0;
    cfg.src_addr = 32'h1000; cfg.wt_addr = 32'h9000; cfg.img = img;
    cfg.in_w = 16'(w); cfg.in_h = 16'(h); cfg.cg = 8'(cg); cfg.kg = 8'(kg);
    cfg.kh = 8'(r); cfg.kw = 8'(s); cfg.wt_bank = 5'(bank);
    for (int i = 0; i < nd; i++) u_sys.u_mem.mem[(32'h1000 >> 3) + i] = {$urandom, $urandom};
    for (int i = 0; i < nw; i++) u_sys.u_mem.mem[(32'h9000 >> 3) + i] = {$urandom, $urandom};
    buffer.delete();
    n_done = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (n_done == 0 && cyc < 50000) begin @(negedge clk); cyc++; end
    check(n_done == 1, "done pulse");
    for (int i = 0; i < nd; i++) begin
      logic [63:0] w_in = u_sys.u_mem.mem[(32'h1000 >> 3) + (img ? i / 2 : i)];
      logic [63:0] want = img ? {32'd0, w_in[(i % 2) * 32 +: 32]} : w_in;
      if (!buffer.exists(i) || buffer[i] != want) bad++;
    end
    for (int i = 0; i < nw; i++)
      if (!buffer.exists(bank * CBUF_BANK_DEPTH + i) ||
          buffer[bank * CBUF_BANK_DEPTH + i] != u_sys.u_mem.mem[(32'h9000 >> 3) + i]) bad++;
    check(bad == 0, $sformatf("buffer contents (%0d wrong)", bad));
    check(buffer.size() == nd + nw, "no stray buffer writes");
    repeat (30) @(negedge clk);
    check(n_done == 1, "single done pulse");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(6, 5, 2, 2, 3, 3, 20);
    run(16, 16, 4, 4, 3, 3, 16);
    run(3, 3, 1, 1, 1, 1, 31);
    run(7, 5, 1, 2, 3, 3, 4, 1);
    run(4, 4, 1, 1, 2, 2, 1, 1);
    check(max_out > 8, $sformatf("reads pipelined (up to %0d in flight)", max_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

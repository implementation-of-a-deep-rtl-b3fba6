// tb_nvdla_mcif - checks the memory interface with all read and write
// clients active at once against the AXI memory model (random ready,
// latency): every read returns the addressed word to the client that asked,
// in that client's request order and at most one response per cycle; every
// write reaches memory and is acknowledged to its own client exactly once;
// reads run with several requests in flight.
module tb_nvdla_mcif;
  import nvdla_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act
  always #5 clk = ~clk;

  logic [NUM_RD-1:0]               rd_req_valid = 0, rd_req_ready, rd_resp_valid;
  addr_t [NUM_RD-1:0]              rd_req_addr = '0;
  logic [MEMIF_DW-1:0]             rd_resp_data;
  logic [NUM_WR-1:0]               wr_req_valid = 0, wr_req_ready, wr_ack;
  addr_t [NUM_WR-1:0]              wr_req_addr = '0;
  logic [NUM_WR-1:0][MEMIF_DW-1:0] wr_req_data = '0;

  tb_memsys #(.LAT(12), .READY_PCT(60)) u_sys (.clk, .rst_n, .rd_req_valid, .rd_req_ready,
    .rd_req_addr, .rd_resp_valid, .rd_resp_data, .wr_req_valid, .wr_req_ready, .wr_req_addr,
    .wr_req_data, .wr_ack);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int NREQ = 300;
  logic [63:0] rexp [NUM_RD][$];
  int n_rd_issued [NUM_RD], n_rd_got [NUM_RD], n_wr_issued [NUM_WR], n_ack [NUM_WR];
  int rd_bad = 0, multi = 0, max_out = 0;
  logic [63:0] wexp [int];

  // read region 0x0000-0x7fff (words 0..4095) is never written
  initial begin
    for (int i = 0; i < 4096; i++) u_sys.u_mem.mem[i] = {32'(i) ^ 32'h5a5a5a5a, $urandom};
    foreach (n_rd_issued[i]) begin n_rd_issued[i] = 0; n_rd_got[i] = 0; end
    foreach (n_wr_issued[i]) begin n_wr_issued[i] = 0; n_ack[i] = 0; end
  end

  always @(posedge clk) if (rst_n) begin
    int out;
    // accepted requests
    for (int c = 0; c < NUM_RD; c++)
      if (rd_req_valid[c] && rd_req_ready[c]) begin
        rexp[c].push_back(u_sys.u_mem.mem[rd_req_addr[c] >> 3]);
        n_rd_issued[c]++;
      end
    for (int c = 0; c < NUM_WR; c++)
      if (wr_req_valid[c] && wr_req_ready[c]) begin
        wexp[int'(wr_req_addr[c] >> 3)] = wr_req_data[c];
        n_wr_issued[c]++;
      end
    // responses
    if ($countones(rd_resp_valid) > 1) multi++;
    for (int c = 0; c < NUM_RD; c++)
      if (rd_resp_valid[c]) begin
        if (rexp[c].size() == 0 || rd_resp_data != rexp[c].pop_front()) rd_bad++;
        n_rd_got[c]++;
      end
    for (int c = 0; c < NUM_WR; c++) if (wr_ack[c]) n_ack[c]++;
    out = 0;
    for (int c = 0; c < NUM_RD; c++) out += n_rd_issued[c] - n_rd_got[c];
    if (out > max_out) max_out = out;
    // new requests (valid held until accepted)
    for (int c = 0; c < NUM_RD; c++)
      if (!(rd_req_valid[c] && !rd_req_ready[c])) begin
        rd_req_valid[c] <= (n_rd_issued[c] < NREQ) &&
                           ($urandom % 4 != 0);
        rd_req_addr[c]  <= addr_t'(($urandom % 4096) * 8);
      end
    for (int c = 0; c < NUM_WR; c++)
      if (!(wr_req_valid[c] && !wr_req_ready[c])) begin
        automatic int n = n_wr_issued[c];
        wr_req_valid[c] <= (n < NREQ) && ($urandom % 3 != 0);
        wr_req_addr[c]  <= addr_t'(32'h8000 + 32'(c) * 32'h2000 + 32'(n) * 8);
        wr_req_data[c]  <= {$urandom, $urandom};
      end
  end

  initial begin
    automatic int cyc = 0;
    bit fin;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      cyc++;
      fin = 1;
      for (int c = 0; c < NUM_RD; c++) if (n_rd_got[c] < NREQ) fin = 0;
      for (int c = 0; c < NUM_WR; c++) if (n_ack[c] < NREQ) fin = 0;
    end while (!fin && cyc < 50000);
    repeat (50) @(posedge clk);
    for (int c = 0; c < NUM_RD; c++)
      check(n_rd_issued[c] == NREQ && n_rd_got[c] == NREQ, $sformatf("read client %0d: all answered", c));
    check(rd_bad == 0, $sformatf("read data, routing and order (%0d wrong)", rd_bad));
    check(multi == 0, "one read response per cycle");
    check(max_out > 4, $sformatf("reads overlap (up to %0d in flight)", max_out));
    check(max_out <= MEMIF_LATENCY, "in-flight reads within the limit");
    for (int c = 0; c < NUM_WR; c++)
      check(n_wr_issued[c] == NREQ && n_ack[c] == NREQ, $sformatf("write client %0d: one ack per write (%0d issued, %0d acks)", c, n_wr_issued[c], n_ack[c]));
    begin
      automatic int bad = 0;
      foreach (wexp[a]) if (u_sys.u_mem.mem[a] != wexp[a]) bad++;
      check(bad == 0 && wexp.size() == NUM_WR * NREQ, $sformatf("written words in memory (%0d wrong)", bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

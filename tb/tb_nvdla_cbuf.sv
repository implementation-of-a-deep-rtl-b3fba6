// tb_nvdla_cbuf - checks the convolution buffer: random writes across all
// banks, reads every cycle with the data one cycle after the address, and
// a write and a read in the same cycle.
module tb_nvdla_cbuf;
  import nvdla_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic               wr_en = 0, rd_en = 0;
  logic [CBUF_AW-1:0] wr_addr = 0, rd_addr = 0;
  atom_t              wr_data = 0, rd_data;

  nvdla_cbuf dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  atom_t model [int];
  int    addrs [$];

  initial begin
    // one entry in every bank, plus random entries
    for (int i = 0; i < 600; i++) begin
      automatic int a = (i < CBUF_BANK_NUM) ? i * CBUF_BANK_DEPTH + int'($urandom % CBUF_BANK_DEPTH)
                                  : int'($urandom % CBUF_ENTRIES);
      @(negedge clk);
      wr_en = 1; wr_addr = CBUF_AW'(a); wr_data = {$urandom, $urandom};
      model[a] = wr_data;
      if (addrs.size() == 0 || addrs[$] != a) addrs.push_back(a);
    end
    @(negedge clk);
    wr_en = 0;
    // back-to-back reads: address in cycle n, data valid after edge n
    foreach (addrs[i]) begin
      @(negedge clk);
      rd_en = 1; rd_addr = CBUF_AW'(addrs[i]);
      @(posedge clk);
      #1 check(rd_data == model[addrs[i]], $sformatf("read entry %0d", addrs[i]));
    end
    // read enable low holds the output
    @(negedge clk);
    rd_en = 0; rd_addr = CBUF_AW'(addrs[0]);
    @(posedge clk);
    #1 check(rd_data == model[addrs[$]], "output held without read enable");
    // simultaneous write and read of different entries
    @(negedge clk);
    wr_en = 1; wr_addr = 0; wr_data = 64'h0123_4567_89ab_cdef;
    rd_en = 1; rd_addr = CBUF_AW'(CBUF_ENTRIES - 1);
    model[0] = wr_data;
    @(posedge clk);
    #1 check(!model.exists(CBUF_ENTRIES - 1) || rd_data == model[CBUF_ENTRIES - 1], "read during write");
    @(negedge clk);
    wr_en = 0; rd_addr = 0;
    @(posedge clk);
    #1 check(rd_data == 64'h0123_4567_89ab_cdef, "written word read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

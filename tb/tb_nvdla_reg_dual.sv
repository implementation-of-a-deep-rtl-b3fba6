// tb_nvdla_reg_dual - checks the ping-pong register groups: writes go to
// the producer group, the unit sees the consumer group, OP_ENABLE protects a
// group, done clears it, raises the event of that group and flips the
// consumer pointer, and a group enabled in advance runs next.
module tb_nvdla_reg_dual;
  import nvdla_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act
  always #5 clk = ~clk;

  logic        sel = 0, op_en, cur, done = 0;
  reg_req_t    req = '0;
  logic [31:0] rdata;
  regs_t       cfg;
  logic [1:0]  ev;

  nvdla_reg_dual dut (.clk, .rst_n, .sel, .req, .rdata, .cfg, .op_en, .cur_group(cur),
                      .done, .done_ev(ev));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    sel = 1; req = '{wr: 1, rd: 0, addr: a, wdat: d};
    @(negedge clk);
    sel = 0; req = '0;
  endtask

  task automatic pulse_done();
    @(negedge clk);
    done = 1;
    @(negedge clk);
    done = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // group 0
    wr(8'h11, 32'hAAAA0001);
    wr(8'h1F, 32'h12345678);
    check(!op_en && cur == 0, "idle after reset");
    req.addr = 8'h11; #1 check(rdata == 32'hAAAA0001, "read back producer group");
    wr(8'h10, 1);
    check(op_en && cfg[1] == 32'hAAAA0001 && cfg[15] == 32'h12345678, "unit sees group 0");
    wr(8'h11, 32'hDEAD);
    check(cfg[1] == 32'hAAAA0001, "enabled group ignores writes");
    // program group 1 while group 0 is running
    wr(8'h01, 1);
    req.addr = 8'h01; #1 check(rdata == 32'h0000_0001, "producer pointer 1, consumer 0");
    wr(8'h11, 32'hBBBB0002);
    wr(8'h10, 1);
    req.addr = 8'h00; #1 check(rdata == 32'h0001_0001, "both groups enabled");
    check(cfg[1] == 32'hAAAA0001, "unit still on group 0");
    pulse_done();
    check(ev == 2'b01, "done event for group 0");
    check(cur == 1 && op_en && cfg[1] == 32'hBBBB0002, "switched to group 1");
    @(negedge clk);
    check(ev == 2'b00, "event lasts one cycle");
    pulse_done();
    check(ev == 2'b10, "done event for group 1");
    check(cur == 0 && !op_en, "back to idle group 0");
    req.addr = 8'h00; #1 check(rdata == 32'h0, "no group enabled");
    // done while idle has no effect
    pulse_done();
    check(ev == 2'b00 && cur == 0, "done ignored while idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

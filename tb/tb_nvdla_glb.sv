// tb_nvdla_glb - checks interrupt collection: events set status bits, the
// interrupt follows unmasked status one cycle later, writing 1 clears a bit,
// masked bits do not interrupt, INTR_SET raises bits.
module tb_nvdla_glb;
  import nvdla_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act
  always #5 clk = ~clk;

  logic        sel = 0, intr;
  reg_req_t    req = '0;
  logic [31:0] rdata;
  logic [7:0]  ev = 0;

  nvdla_glb dut (.clk, .rst_n, .sel, .req, .rdata, .ev, .intr);

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

  task automatic status(output logic [31:0] s);
    req.addr = 8'h03; #1 s = rdata;
  endtask

  initial begin
    logic [31:0] s;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!intr, "no interrupt after reset");
    req.addr = 8'h00; #1 check(rdata == 32'h0001_0000, "version");
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); ev = 8'(1 << i);
      @(negedge clk); ev = 0;
      status(s);
      check(s == 32'(1 << i), "event sets its status bit");
      @(negedge clk);
      check(intr, "interrupt raised");
      wr(8'h03, 32'(1 << i));
      status(s);
      check(s == 0, "write one clears");
      @(negedge clk);
      check(!intr, "interrupt released");
    end
    // clearing one bit leaves the others set
    @(negedge clk); ev = 8'h81;
    @(negedge clk); ev = 0;
    wr(8'h03, 32'h01);
    status(s);
    check(s == 32'h80, "write one clears only the bits written");
    @(negedge clk);
    check(intr, "remaining bit keeps the interrupt");
    wr(8'h03, 32'h80);
    @(negedge clk);
    @(negedge clk);
    check(!intr, "interrupt released when all are cleared");
    wr(8'h01, 32'h0F);
    req.addr = 8'h01; #1 check(rdata == 32'h0F, "mask readback");
    @(negedge clk); ev = 8'h05;
    @(negedge clk); ev = 0;
    repeat (2) @(negedge clk);
    check(!intr, "masked sources do not interrupt");
    wr(8'h02, 32'h40);
    status(s);
    check(s == 32'h45, "INTR_SET raises a bit");
    @(negedge clk);
    check(intr, "unmasked set bit interrupts");
    wr(8'h03, 32'hFF);
    repeat (2) @(negedge clk);
    check(!intr, "cleared");
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

// tb_apb2csb - checks the APB-to-CSB bridge against a CSB responder model
// with random ready and random read latency: every APB write must arrive on
// the CSB as one posted write with address paddr[17:2] and the same data;
// every APB read must return the responder's data, and pready must not rise
// n_prev the CSB has answered.
module tb_apb2csb;
  import nvdla_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act
  always #5 clk = ~clk;

  logic        psel = 0, penable = 0, pwrite = 0, pready, pslverr;
  logic [31:0] paddr = 0, pwdata = 0, prdata;
  logic        cvalid, cready = 0, cwrite, cnposted, rvalid = 0;
  logic [15:0] caddr;
  logic [31:0] cwdat, rdata = 0;

  apb2csb dut (.pclk(clk), .prstn(rst_n), .psel, .penable, .pwrite, .paddr, .pwdata,
    .prdata, .pready, .pslverr, .csb2nvdla_valid(cvalid), .csb2nvdla_ready(cready),
    .csb2nvdla_addr(caddr), .csb2nvdla_wdat(cwdat), .csb2nvdla_write(cwrite),
    .csb2nvdla_nposted(cnposted), .nvdla2csb_valid(rvalid), .nvdla2csb_data(rdata));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // CSB responder: random ready; reads answered 1..4 cycles after acceptance
  logic [15:0] last_addr;
  logic [31:0] last_wdat;
  logic        last_write;
  int          n_acc = 0, rd_wait = -1;
  always @(posedge clk) begin
    rvalid <= 1'b0;
    cready <= ($urandom % 3) != 0;
    if (cvalid && cready) begin
      n_acc++;
      last_addr = caddr; last_wdat = cwdat; last_write = cwrite;
      check(cnposted == 1'b0, "writes are posted");
      if (!cwrite) rd_wait = 1 + $urandom % 4;
    end else if (rd_wait > 0) rd_wait--;
    if (rd_wait == 0) begin
      rvalid  <= 1'b1;
      rdata   <= {last_addr, ~last_addr};
      rd_wait = -1;
    end
  end

  // setup phase, then access phase until pready; signals change on the
  // falling edge, the transfer completes on the rising edge with pready high
  task automatic apb(bit wr, logic [31:0] a, logic [31:0] d, output logic [31:0] q, output int cyc);
    @(negedge clk);
    psel = 1; pwrite = wr; paddr = a; pwdata = d; penable = 0;
    @(negedge clk);
    penable = 1;
    cyc = 0;
    forever begin
      #1;
      if (pready) break;
      @(negedge clk);
      cyc++;
    end
    q = prdata;
    @(posedge clk);
    #1;
    psel = 0; penable = 0;
  endtask

  initial begin
    logic [31:0] q;
    int cyc, n_prev;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      logic [31:0] a, d;
      a = {14'd0, 16'($urandom), 2'b00};
      d = $urandom;
      n_prev = n_acc;
      if (i % 2 == 0) begin
        apb(1, a, d, q, cyc);
        check(n_acc == n_prev + 1, "one CSB request per APB write");
        check(last_write && last_addr == a[17:2] && last_wdat == d, "write address/data");
      end else begin
        apb(0, a, d, q, cyc);
        check(n_acc == n_prev + 1, "one CSB request per APB read");
        check(!last_write && last_addr == a[17:2], "read address");
        check(q == {a[17:2], ~a[17:2]}, "read data");
        check(cyc >= 2, "read waits for the CSB answer");
      end
      check(pslverr == 1'b0, "no slave error");
    end
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

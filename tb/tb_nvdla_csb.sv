// tb_nvdla_csb - checks the CSB slave: unit decode from address bits
// [15:8], forwarding of address and data, read data one cycle after the
// request, write completion only for non-posted writes, 0 for unmapped
// units.
module tb_nvdla_csb;
  import nvdla_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act
  always #5 clk = ~clk;

  logic        valid = 0, ready, write = 0, nposted = 0, rvalid, wr_complete;
  logic [15:0] addr = 0;
  logic [31:0] wdat = 0, rdata;
  reg_req_t    req;
  logic [5:0]  sel;
  logic [5:0][31:0] urd;

  nvdla_csb #(.NUNIT(6)) dut (.clk, .rst_n, .csb2nvdla_valid(valid), .csb2nvdla_ready(ready),
    .csb2nvdla_addr(addr), .csb2nvdla_wdat(wdat), .csb2nvdla_write(write),
    .csb2nvdla_nposted(nposted), .nvdla2csb_valid(rvalid), .nvdla2csb_data(rdata),
    .nvdla2csb_wr_complete(wr_complete), .req, .sel, .rdata(urd));

  // each unit answers with its number and the register offset
  always_comb for (int u = 0; u < 6; u++) urd[u] = {8'hA0 + 8'(u), 16'd0, req.addr};

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [7:0] CODES [7] = '{8'h00, 8'h01, 8'h10, 8'h20, 8'h30, 8'h31, 8'h55};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      automatic int u = i % 7;
      automatic logic [7:0] off = 8'($urandom);
      automatic bit wr = ((i / 7) % 2) != 0;
      automatic bit np = 1'($urandom % 2);
      @(negedge clk);
      valid = 1; addr = {CODES[u], off}; write = wr; nposted = np; wdat = $urandom;
      #1;
      check(ready, "always ready");
      check(req.addr == off && req.wdat == wdat && req.wr == wr && req.rd == !wr, "request fields");
      check(u == 6 ? sel == 0 : sel == 6'(1 << u), "unit select");
      @(negedge clk);
      valid = 0;
      if (wr) begin
        check(!rvalid, "no read data for a write");
        check(wr_complete == np, "write completion only when non-posted");
      end else begin
        check(rvalid, "read data one cycle later");
        check(rdata == (u == 6 ? 32'd0 : {8'hA0 + 8'(u), 16'd0, off}), "read data routed");
        check(!wr_complete, "no write completion for a read");
      end
      @(negedge clk);
      check(!rvalid && !wr_complete, "single-cycle responses");
    end
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

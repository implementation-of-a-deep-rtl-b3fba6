// tb_nvdla_cfgrom - reads every configuration word and compares it with the
// small configuration's values.
module tb_nvdla_cfgrom;
  import nvdla_pkg::*;

  reg_req_t    req = '0;
  logic [31:0] rdata;

  nvdla_cfgrom dut (.req, .rdata);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int EXP [12] = '{8, 8, 32, 8, 512, 64, 32, 3, 3, 64, 32'h0F, 0};

  initial begin
    for (int i = 0; i < 12; i++) begin
      req.addr = 8'(i);
      #1 check(rdata == 32'(EXP[i]), $sformatf("word %0d", i));
    end
    req.addr = 8'hFF;
    #1 check(rdata == 0, "unmapped word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nvdla_sdp - checks the single point processor: bias, scale, shift,
// ReLU / PReLU / none and int8 saturation of every element against a
// reference, the output address of every atom, done only after every write
// response, and the rate of one element per cycle (a pixel of ATOMIC_K
// elements every ATOMIC_K cycles when memory never stalls).
module tb_nvdla_sdp;
  import nvdla_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act
  always #5 clk = ~clk;

  logic                             start = 0, done, in_valid = 0, in_ready;
  conv_cfg_t                        cfg = '0;
  logic signed [ATOMIC_K-1:0][31:0] in_data = '0;
  logic [15:0]                      in_pix = 0;
  logic [7:0]                       in_kg = 0;
  logic                             wr_req_valid, wr_req_ready = 0, wr_ack = 0;
  addr_t                            wr_req_addr;
  logic [MEMIF_DW-1:0]              wr_req_data;

  nvdla_sdp dut (.clk, .rst_n, .start, .cfg, .done, .in_valid, .in_ready, .in_data, .in_pix,
                 .in_kg, .wr_req_valid, .wr_req_ready, .wr_req_addr, .wr_req_data, .wr_ack);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // memory write client model: random ready, response 3 cycles later
  int  stall_pct = 50;
  logic [63:0] wmem [addr_t];
  logic [3:0]  ack_pipe = 0;
  always @(posedge clk) begin
    wr_req_ready <= ($urandom % 100) >= stall_pct;
    if (wr_req_valid && wr_req_ready) wmem[wr_req_addr] = wr_req_data;
    ack_pipe <= {ack_pipe[2:0], wr_req_valid && wr_req_ready};
    wr_ack   <= ack_pipe[2];
  end

  int n_done = 0;
  always @(posedge clk) if (done) n_done++;

  function automatic logic [7:0] ref_elem(longint x);
    longint v;
    v = ((x + longint'(cfg.bias)) * longint'(cfg.scale)) >>> cfg.shift;
    if (cfg.act == ACT_RELU && v < 0) v = 0;
    if (cfg.act == ACT_PRELU && v < 0) v = (v * longint'(cfg.prelu_a)) >>> cfg.prelu_shift;
    if (v > 127) return 8'h7f;
    if (v < -128) return 8'h80;
    return 8'(v);
  endfunction

  task automatic run(int ow, int oh, int kg, act_e act, int stall, output int cycles);
    int np = ow * oh, bad = 0, cyc = 0;
    logic [7:0] exp [addr_t];
    logic signed [31:0] x;
    bit acc;
    stall_pct = stall;
    wmem.delete();
    n_done = 0;
    cfg.out_w = 16'(ow); cfg.out_h = 16'(oh); cfg.kg = 8'(kg);
    cfg.dst_addr = 32'h4000 + 32'($urandom % 64) * 8;
    cfg.bias = $signed($urandom % 2001) - 1000;
    cfg.scale = 16'($urandom % 300) - 16'd100;
    cfg.shift = 6'(4 + $urandom % 6);
    cfg.act = act;
    cfg.prelu_a = 8'($urandom % 64 + 1);
    cfg.prelu_shift = 5'(3 + $urandom % 3);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    // stream kernel group planes, pixels in order, as the accumulator does
    for (int g = 0; g < kg; g++)
      for (int p = 0; p < np; p++) begin
        in_valid = 1; in_pix = 16'(p); in_kg = 8'(g);
        for (int k = 0; k < ATOMIC_K; k++) begin
          x = $signed($urandom % 40001) - 20000;
          in_data[k] = x;
          exp[cfg.dst_addr + 32'((p * kg + g) * 8 + k)] = ref_elem(longint'(x));
        end
        do begin #1; acc = in_ready; @(negedge clk); cyc++; end while (!acc);
      end
    in_valid = 0;
    while (n_done == 0 && cyc < 100000) begin @(negedge clk); cyc++; end
    cycles = cyc;
    check(n_done == 1, "done after all write responses");
    check(wmem.size() == np * kg, "one write per output atom");
    foreach (exp[a]) begin
      logic [63:0] w;
      w = wmem.exists({a[31:3], 3'b0}) ? wmem[{a[31:3], 3'b0}] : 64'hx;
      if (w[a[2:0] * 8 +: 8] !== exp[a]) bad++;
    end
    check(bad == 0, $sformatf("element values and addresses (%0d wrong)", bad));
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(5, 4, 2, ACT_NONE, 50, cyc);
    run(3, 7, 1, ACT_RELU, 30, cyc);
    run(4, 4, 3, ACT_PRELU, 70, cyc);
    run(16, 8, 1, ACT_RELU, 0, cyc);
    // 128 pixels of 8 elements at one element per cycle, plus the write
    // response latency at the end
    check(cyc >= 128 * ATOMIC_K && cyc <= 128 * ATOMIC_K + 20,
          $sformatf("one element per cycle (%0d cycles for 1024 elements)", cyc));
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

// tb_nvdla_cacc - checks the accumulator: partial sums of several kernel
// steps (first overwrites, later ones add) for every pixel, then a drain in
// pixel order under random back-pressure with the right sums and kernel
// group, one pixel per accepted cycle, and one drained pulse at the end.
module tb_nvdla_cacc;
  import nvdla_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act
  always #5 clk = ~clk;

  logic [15:0]                      npix = 0;
  logic                             psum_valid = 0, out_valid, out_ready = 0, drained;
  logic signed [ATOMIC_K-1:0][31:0] psum = '0, out_data;
  conv_tag_t                        psum_tag = '0;
  logic [15:0]                      out_pix;
  logic [7:0]                       out_kg;

  nvdla_cacc dut (.clk, .rst_n, .npix, .psum_valid, .psum, .psum_tag, .out_valid, .out_ready,
                  .out_data, .out_pix, .out_kg, .drained);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_drained = 0;
  always @(posedge clk) if (drained) n_drained++;

  task automatic plane(int np, int steps, int kg);
    int exp [][ATOMIC_K];
    int got = 0, n_acc = 0, bad = 0, wait_cyc = 0;
    exp = new[np];
    npix = 16'(np);
    for (int st = 0; st < steps; st++)
      for (int p = 0; p < np; p++) begin
        @(negedge clk);
        psum_valid = 1;
        psum_tag = '{pix: 16'(p), kg: 8'(kg), first: st == 0, last: st == steps - 1};
        for (int k = 0; k < ATOMIC_K; k++) begin
          psum[k] = $signed($urandom % 200001) - 100000;
          exp[p][k] = (st == 0) ? psum[k] : exp[p][k] + psum[k];
        end
        if ($urandom % 4 == 0) begin @(negedge clk); psum_valid = 0; end
      end
    @(negedge clk);
    psum_valid = 0;
    // drain with random ready
    while (got < np && wait_cyc < 10 * np + 100) begin
      out_ready = ($urandom % 3) != 0;
      #1;
      if (out_valid && out_ready) begin
        if (out_pix != 16'(got) || out_kg != 8'(kg)) bad++;
        for (int k = 0; k < ATOMIC_K; k++) if (out_data[k] != exp[got][k]) bad++;
        got++;
        n_acc++;
      end
      @(negedge clk);
      wait_cyc++;
    end
    out_ready = 0;
    check(got == np, "every pixel drained");
    check(bad == 0, $sformatf("drained sums, pixel order, kernel group (%0d wrong)", bad));
    @(negedge clk);
    check(!out_valid, "no output after the drain");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    plane(37, 3, 0);
    check(n_drained == 1, "drained pulse after the plane");
    plane(1, 1, 5);
    check(n_drained == 2, "drained pulse, single pixel");
    plane(300, 9, 2);
    check(n_drained == 3, "drained pulse, 3x3 kernel");
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

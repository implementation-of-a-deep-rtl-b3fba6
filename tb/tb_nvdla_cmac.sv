// tb_nvdla_cmac - checks the MAC array: weights loaded per cell stay put,
// every data atom gives ATOMIC_K dot products of ATOMIC_C signed int8
// pairs, one cycle after the atom, at one atom per cycle, with its tag.
module tb_nvdla_cmac;
  import nvdla_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act
  always #5 clk = ~clk;

  logic                             wt_valid = 0, dat_valid = 0, psum_valid;
  logic [$clog2(ATOMIC_K)-1:0]      wt_k = 0;
  atom_t                            wt_data = 0, dat_data = 0;
  conv_tag_t                        dat_tag = '0, psum_tag;
  logic signed [ATOMIC_K-1:0][31:0] psum;

  nvdla_cmac dut (.clk, .rst_n, .wt_valid, .wt_k, .wt_data, .dat_valid, .dat_data, .dat_tag,
                  .psum_valid, .psum, .psum_tag);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  atom_t w [ATOMIC_K];

  function automatic atom_t rnd_atom(int mode);
    atom_t a;
    for (int c = 0; c < ATOMIC_C; c++)
      a[c] = (mode == 0) ? 8'($urandom) : (mode == 1) ? 8'h80 : 8'h7f;
    return a;
  endfunction

  function automatic int dot(atom_t d, atom_t wk);
    int s = 0;
    for (int c = 0; c < ATOMIC_C; c++) s += int'($signed(d[c])) * int'($signed(wk[c]));
    return s;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      // load the weights of all cells (extremes in the last round)
      for (int k = 0; k < ATOMIC_K; k++) begin
        @(negedge clk);
        wt_valid = 1; wt_k = 3'(k); wt_data = rnd_atom(round == 3 ? 1 : 0);
        w[k] = wt_data;
      end
      @(negedge clk);
      wt_valid = 0;
      // stream atoms back to back
      for (int i = 0; i < 40; i++) begin
        atom_t d;
        conv_tag_t t;
        d = rnd_atom(round == 3 ? (i % 2 + 1) : 0);
        t = '{pix: 16'($urandom), kg: 8'(round), first: i == 0, last: i == 39};
        dat_valid = 1; dat_data = d; dat_tag = t;
        @(negedge clk);
        check(psum_valid, "result one cycle after the atom");
        check(psum_tag == t, "tag travels with the result");
        for (int k = 0; k < ATOMIC_K; k++)
          check(psum[k] == dot(d, w[k]), $sformatf("cell %0d dot product", k));
      end
      dat_valid = 0;
      @(negedge clk);
      check(!psum_valid, "no result without data");
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

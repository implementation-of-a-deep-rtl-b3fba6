// tb_nvdla_csc - checks the convolution sequencer against a model of the
// weight-stationary order. A buffer model answers reads one cycle late. For
// every kernel group and kernel step the testbench expects ATOMIC_K weight
// loads (cell k gets the k-th weight atom of the step) followed by one data
// atom per cycle for every output pixel, with the input pixel chosen by
// stride, kernel offset and padding (a zero atom where the pixel lies in
// the padding) and the first/last tags set on the first and
// last kernel step. The accumulator's drained pulse is modelled a few
// cycles after the last atom of a group; done must follow the last group.
module tb_nvdla_csc;
  import nvdla_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act
  always #5 clk = ~clk;

  logic                        start = 0, done, cbuf_rd_en, wt_valid, dat_valid, drained = 0;
  conv_cfg_t                   cfg = '0;
  logic [CBUF_AW-1:0]          cbuf_rd_addr;
  atom_t                       cbuf_rd_data, wt_data, dat_data;
  logic [$clog2(ATOMIC_K)-1:0] wt_k;
  conv_tag_t                   dat_tag;

  nvdla_csc dut (.clk, .rst_n, .start, .cfg, .done, .cbuf_rd_en, .cbuf_rd_addr, .cbuf_rd_data,
                 .wt_valid, .wt_k, .wt_data, .dat_valid, .dat_data, .dat_tag, .drained);

  // buffer model: each entry holds its own address, so data identifies it
  always_ff @(posedge clk) if (cbuf_rd_en) cbuf_rd_data <= atom_t'({32'hC0DE_0000, 32'(cbuf_rd_addr)});

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected event stream
  typedef struct packed {
    logic                        is_wt;
    logic [$clog2(ATOMIC_K)-1:0] k;
    logic [63:0]                 data;
    conv_tag_t                   tag;
  } ev_t;
  ev_t exp_q [$];
  int  bad = 0, n_ev = 0, n_done = 0, gap = 0;
  int  run_len = 0;

  always @(posedge clk) if (rst_n) begin
    if (wt_valid || dat_valid) begin
      ev_t e, x;
      e = '{is_wt: wt_valid, k: wt_valid ? wt_k : '0, data: wt_valid ? wt_data : dat_data,
            tag: dat_valid ? dat_tag : '0};
      n_ev++;
      if (exp_q.size() == 0) bad++;
      else begin
        x = exp_q.pop_front();
        if (e != x) begin
          if (bad < 5) $display("  event %0d: got %h expected %h", n_ev, e, x);
          bad++;
        end
      end
      if (dat_valid && dat_tag.last && dat_tag.pix == 16'(int'(cfg.out_w) * int'(cfg.out_h) - 1))
        fork begin repeat (4) @(posedge clk); drained <= 1; @(posedge clk); drained <= 0; end join_none
    end
    // the data atoms of one plane come one per cycle: every unbroken run of
    // data cycles is exactly one plane long
    if (dat_valid) run_len++;
    else if (run_len > 0) begin
      if (run_len != int'(cfg.out_w) * int'(cfg.out_h)) gap++;
      run_len = 0;
    end
    if (done) n_done++;
  end

  task automatic run(int w, int h, int cg, int kg, int r, int s, int stride, int bank,
                     int px = 0, int py = 0);
    int ow = (w + 2 * px - s) / stride + 1, oh = (h + 2 * py - r) / stride + 1, cyc = 0;
    cfg.in_w = 16'(w); cfg.in_h = 16'(h); cfg.cg = 8'(cg); cfg.kg = 8'(kg);
    cfg.kh = 8'(r); cfg.kw = 8'(s); cfg.stride = 4'(stride); cfg.wt_bank = 5'(bank);
    cfg.out_w = 16'(ow); cfg.out_h = 16'(oh); cfg.pad_x = 4'(px); cfg.pad_y = 4'(py);
    exp_q.delete();
    bad = 0; n_done = 0;
    for (int g = 0, wi = 0; g < kg; g++)
      for (int ry = 0; ry < r; ry++)
        for (int sx = 0; sx < s; sx++)
          for (int c = 0; c < cg; c++) begin
            for (int k = 0; k < ATOMIC_K; k++, wi++)
              exp_q.push_back('{is_wt: 1, k: 3'(k), data: {32'hC0DE_0000, 32'(bank * CBUF_BANK_DEPTH + wi)},
                                tag: '0});
            for (int oy = 0; oy < oh; oy++)
              for (int ox = 0; ox < ow; ox++) begin
                int iy = oy * stride + ry - py, ix = ox * stride + sx - px;
                int ent = (iy * w + ix) * cg + c;
                bit pad = iy < 0 || iy >= h || ix < 0 || ix >= w;
                exp_q.push_back('{is_wt: 0, k: '0, data: pad ? 64'd0 : {32'hC0DE_0000, 32'(ent)},
                                  tag: '{pix: 16'(oy * ow + ox), kg: 8'(g),
                                         first: ry == 0 && sx == 0 && c == 0,
                                         last: ry == r - 1 && sx == s - 1 && c == cg - 1}});
              end
          end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (n_done == 0 && cyc < 100000) begin @(negedge clk); cyc++; end
    check(n_done == 1, "done after the last kernel group");
    check(exp_q.size() == 0, $sformatf("all expected events seen (%0d left)", exp_q.size()));
    check(bad == 0, $sformatf("weight loads and data atoms in order (%0d wrong)", bad));
    repeat (10) @(negedge clk);
    check(n_done == 1, "single done pulse");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(6, 5, 2, 2, 3, 3, 1, 20);
    run(9, 9, 1, 1, 3, 3, 2, 16);
    run(4, 4, 3, 3, 1, 1, 1, 31);
    run(7, 3, 1, 2, 2, 3, 2, 8);
    run(5, 4, 2, 1, 3, 3, 1, 12, 1, 1);
    run(6, 6, 1, 2, 5, 5, 2, 8, 2, 2);
    run(3, 3, 2, 1, 3, 3, 1, 4, 0, 2);
    check(gap == 0, "one data atom per cycle within a plane");
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

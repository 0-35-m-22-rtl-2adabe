// End-to-end test of the clock generator driving the circular memory SC
// FIR filter, at the design's full size (no parameter overrides).
//
// The external two-phase clock comes from a behavioural source. For each
// run the filter is held in reset, set to one or two sections, loaded with
// random coefficients and released; then, slot by slot:
//   - the first phase of the slot's cell must rise at the slot's clk rise
//     (cell t mod L in each section, so each phase repeats every L slots);
//   - after the evaluate phase, out1 (and out2 in two-sections mode) must
//     equal a direct FIR sum of the input history; out2 must be 0 in
//     one-section mode.
// Runs use coinciding, dead-time and overlapping clk/clk1 edges. A mode
// change without reset is also made, after which the counter must correct
// itself within L-1 slots. Counted mechanisms, each of which must occur:
// one-section slots, two-sections slots, coefficient loads, coefficient
// ring wrap-arounds, self-corrections, and coinciding, dead-time and
// overlapping phase crossings.
module tb_sc_fir_clk_top;
  import clkgen_pkg::*;
  real   w_clk = 40.0, gap = 0.0, w_clk1 = 40.0, gap2 = 20.0;
  logic  clk, clk1, rst_n = 1'b1, two_sections = 1'b0, coef_load = 1'b0;
  coef_t coef_in [N_STAGES];
  real   in1 = 0.0, in2 = 0.0, out1, out2;
  logic [N_STAGES-1:0] q;
  logic [N_PHASES-1:0] p, n, p_q = '0;

  coef_t h [N_STAGES];
  real   x1 [$], x2 [$];
  int checks = 0, failures = 0;
  int n_one = 0, n_two = 0, n_load = 0, n_wrap = 0, n_correct = 0;
  int n_coincide = 0, n_dead = 0, n_overlap = 0;
  realtime last_fall = 0;

  two_phase_src src (.w_clk(w_clk), .gap(gap), .w_clk1(w_clk1), .gap2(gap2),
                     .clk(clk), .clk1(clk1));

  sc_fir_clk_top dut (
    .clk(clk), .clk1(clk1), .rst_n(rst_n), .two_sections(two_sections),
    .coef_load(coef_load), .coef_in(coef_in), .in1(in1), .in2(in2),
    .out1(out1), .out2(out2), .q(q), .p(p), .n(n));

  function automatic real gain(coef_t w);
    return real'(w) / real'(1 << (COEF_W - 1));
  endfunction

  function automatic bit close(real a, real b);
    return (a - b < 1e-9) && (b - a < 1e-9);
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s (t=%0t)", msg, $realtime);
  endtask

  // Classify every phase crossing: overlap if another phase is still high
  // when one rises, else the time since the last fall (0 or a dead time).
  always @(p) begin
    for (int k = 0; k < int'(N_PHASES); k++) begin
      if (p[k] && !p_q[k]) begin
        if ((p & ~(N_PHASES'(1) << k) & ~(p & ~p_q)) != '0) n_overlap++;
        else if ($realtime == last_fall) n_coincide++;
        else n_dead++;
      end
      if (!p[k] && p_q[k]) last_fall = $realtime;
    end
    p_q = p;
  end

  task automatic start(logic two, real g);
    rst_n        = 1'b0;
    two_sections = two;
    gap          = g;
    @(negedge clk1);
    foreach (h[k]) begin
      h[k]       = coef_t'($urandom);
      coef_in[k] = h[k];
    end
    coef_load = 1'b1;
    @(negedge clk1);
    #1 coef_load = 1'b0;
    n_load++;
    rst_n = 1'b1;
    x1.delete();
    x2.delete();
    in1 = 0.0;
    in2 = 0.0;
    @(negedge clk1);   // first slot starts
  endtask

  task automatic run_slots(int slots);
    int la, lb;
    la = two_sections ? int'(SPLIT_AT) : int'(N_STAGES);
    lb = int'(N_STAGES) - la;
    for (int t = 0; t < slots; t++) begin
      int ca, cb;
      bit flush;
      real ya, yb;
      flush = t < int'(N_STAGES);   // first slots clear the analog cells
      ca = t % la;
      cb = la + ((lb > 0) ? t % lb : 0);
      @(posedge clk);
      #0.5;
      x1.push_front(in1);
      x2.push_front(in2);
      checks++;
      if (!p[2*ca] || (two_sections && !p[2*cb]))
        fail($sformatf("slot %0d: first phase of cell %0d not active, p=%b", t, ca, p));
      if (two_sections) n_two++;
      else              n_one++;
      if (t > 0 && ca == 0) n_wrap++;
      @(posedge clk1);
      #0.5;
      if (!flush) begin
        ya = 0.0;
        for (int k = 0; k < la; k++) ya += gain(h[k]) * x1[k];
        yb = 0.0;
        for (int k = 0; k < lb; k++) yb += gain(h[la + k]) * x2[k];
        checks++;
        if (!close(out1, ya)) fail($sformatf("slot %0d out1=%f expected %f", t, out1, ya));
        checks++;
        if (!close(out2, two_sections ? yb : 0.0))
          fail($sformatf("slot %0d out2=%f expected %f", t, out2, two_sections ? yb : 0.0));
      end
      in1 = flush && t < int'(N_STAGES) - 1 ? 0.0 : real'($urandom_range(2000)) / 1000.0 - 1.0;
      in2 = flush && t < int'(N_STAGES) - 1 ? 0.0 : real'($urandom_range(2000)) / 1000.0 - 1.0;
    end
  endtask

  function automatic logic legal(logic two, logic [N_STAGES-1:0] s);
    if (!two) return $onehot(s);
    return $onehot(s[SPLIT_AT-1:0]) && $onehot(s[N_STAGES-1:SPLIT_AT]);
  endfunction

  // Change mode without reset; the counter must correct itself.
  task automatic switch_live(logic two);
    int lmax;
    @(posedge clk1);
    two_sections = two;
    lmax = two ? int'(SPLIT_AT) : int'(N_STAGES);
    for (int s = 0; s < lmax; s++) begin
      @(negedge clk1);
      #0.5;
      if (!legal(two, q)) begin
        if (s == 0) n_correct++;
        if (s == lmax - 1) begin
          checks++;
          fail($sformatf("q=%b not corrected after %0d slots", q, lmax - 1));
        end
      end
    end
    repeat (2 * N_STAGES) begin
      @(negedge clk1);
      #0.5;
      checks++;
      if (!legal(two, q)) fail($sformatf("q=%b illegal after mode change", q));
    end
  endtask

  initial begin
    #0.5 rst_n = 1'b0;
    start(1'b0, 0.0);   run_slots(30);
    start(1'b1, 0.0);   run_slots(30);
    start(1'b0, 5.0);   run_slots(20);
    start(1'b1, -3.0);  run_slots(20);
    switch_live(1'b0);
    switch_live(1'b1);
    start(1'b1, 5.0);   run_slots(20);
    start(1'b0, -3.0);  run_slots(20);

    $display("slots one=%0d two=%0d loads=%0d wraps=%0d corrections=%0d",
             n_one, n_two, n_load, n_wrap, n_correct);
    $display("crossings coinciding=%0d dead_time=%0d overlap=%0d",
             n_coincide, n_dead, n_overlap);
    checks += 8;
    if (n_one == 0)      fail("one-section mode never ran");
    if (n_two == 0)      fail("two-sections mode never ran");
    if (n_load == 0)     fail("no coefficient load");
    if (n_wrap == 0)     fail("coefficient ring never wrapped");
    if (n_correct == 0)  fail("no self-correction");
    if (n_coincide == 0) fail("no coinciding crossing");
    if (n_dead == 0)     fail("no dead-time crossing");
    if (n_overlap == 0)  fail("no overlapping crossing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Test of the multiphase clock generator with the external two-phase clock.
// For each mode (one section: p1..p10; two sections: p1..p6 and p7..p10
// side by side) and each of three clk/clk1 timings (edges coinciding, a
// dead time between pulses, overlapping pulses) every phase pulse is
// checked for:
//   - order: within its section it follows the section's previous phase;
//   - width: equal to the clk (first phase of a slot) or clk1 pulse width;
//   - crossing: its rise minus the previous phase's fall equals the gap
//     set between clk and clk1 (inside a slot) or between clk1 and the
//     next clk (between slots); negative means overlap;
//   - period: L slots of the two-phase clock, L the section length;
//   - the complementary phase n is the inverse of p.
// The number of coinciding, dead-time and overlapping crossings seen is
// counted, and each must have happened.
module tb_mp_clkgen;
  import clkgen_pkg::*;
  real w_clk = 40.0, gap = 0.0, w_clk1 = 40.0, gap2 = 20.0;
  logic clk, clk1, rst_n = 1'b1, two = 1'b0;
  clk_cfg_t cfg;
  logic [N_STAGES-1:0] q;
  logic [N_PHASES-1:0] p, n, p_q = '0;
  int checks = 0, failures = 0;
  int n_coincide = 0, n_dead = 0, n_overlap = 0, n_pulses = 0;
  realtime rise_t [N_PHASES], fall_t [N_PHASES];
  bit      seen_fall [N_PHASES], seen_rise [N_PHASES];
  int      last_k [2];

  two_phase_src src (.w_clk(w_clk), .gap(gap), .w_clk1(w_clk1), .gap2(gap2),
                     .clk(clk), .clk1(clk1));

  assign cfg = two ? CFG_TWO_SECTIONS : CFG_ONE_SECTION;

  mp_clkgen dut (.clk(clk), .clk1(clk1), .rst_n(rst_n), .cfg(cfg),
                 .q(q), .p(p), .n(n));

  function automatic int sec_of(int k);
    return (two && k >= int'(2 * SPLIT_AT)) ? 1 : 0;
  endfunction
  function automatic int sec_base(int k);
    return sec_of(k) ? int'(2 * SPLIT_AT) : 0;
  endfunction
  function automatic int sec_len(int k);  // in phases
    if (!two) return int'(N_PHASES);
    return sec_of(k) ? int'(2 * (N_STAGES - SPLIT_AT)) : int'(2 * SPLIT_AT);
  endfunction
  function automatic int prev_of(int k);
    return sec_base(k) + (k - sec_base(k) - 1 + sec_len(k)) % sec_len(k);
  endfunction

  task automatic check(bit ok, string what, real got, real exp);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: got %f expected %f (t=%0t)", what, got, exp, $realtime);
    end
  endtask

  function automatic bit close(real a, real b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  // Crossing between phase k (just risen or rising) and its predecessor.
  task automatic crossing(int k, real g);
    real exp_g;
    exp_g = (k % 2) ? gap : gap2;
    check(close(g, exp_g), $sformatf("crossing p%0d->p%0d", prev_of(k) + 1, k + 1), g, exp_g);
    if (close(g, 0.0))   n_coincide++;
    else if (g > 0.0)    n_dead++;
    else                 n_overlap++;
  endtask

  always @(p) begin
    for (int k = 0; k < int'(N_PHASES); k++) begin
      int pk;
      pk = prev_of(k);
      if (p[k] && !p_q[k]) begin                         // rise of p_k
        n_pulses++;
        check(n[k] == 1'b0, $sformatf("n%0d complement", k + 1), real'(n[k]), 0.0);
        if (last_k[sec_of(k)] >= 0)
          check(last_k[sec_of(k)] == pk, $sformatf("order before p%0d", k + 1),
                real'(last_k[sec_of(k)] + 1), real'(pk + 1));
        last_k[sec_of(k)] = k;
        if (seen_rise[k]) begin
          real per, exp_per;
          per = $realtime - rise_t[k];
          exp_per = real'(sec_len(k) / 2) * (w_clk + gap + w_clk1 + gap2);
          check(close(per, exp_per), $sformatf("period p%0d", k + 1), per, exp_per);
        end
        rise_t[k] = $realtime;
        seen_rise[k] = 1'b1;
        if (!p[pk] && seen_fall[pk]) crossing(k, $realtime - fall_t[pk]);
      end
      if (!p[k] && p_q[k]) begin                         // fall of p_k
        real w, exp_w;
        int nk;
        w = $realtime - rise_t[k];
        exp_w = (k % 2) ? w_clk1 : w_clk;
        check(close(w, exp_w), $sformatf("width p%0d", k + 1), w, exp_w);
        fall_t[k] = $realtime;
        seen_fall[k] = 1'b1;
        // Successor rose while p_k was still high: overlap.
        nk = sec_base(k) + (k - sec_base(k) + 1) % sec_len(k);
        if (p[nk] && seen_rise[nk] && rise_t[nk] < $realtime)
          crossing(nk, rise_t[nk] - $realtime);
      end
    end
    p_q = p;
  end

  task automatic scenario(logic two_m, real g);
    rst_n = 1'b0;
    two   = two_m;
    gap   = g;
    repeat (2) @(negedge clk1);
    foreach (seen_fall[k]) begin
      seen_fall[k] = 1'b0;
      seen_rise[k] = 1'b0;
    end
    last_k[0] = -1;
    last_k[1] = -1;
    #1 rst_n = 1'b1;
    repeat (4 * N_STAGES + 1) @(negedge clk1);
  endtask

  initial begin
    #0.5 rst_n = 1'b0;
    last_k[0] = -1;
    last_k[1] = -1;
    foreach (seen_fall[k]) begin
      seen_fall[k] = 1'b0;
      seen_rise[k] = 1'b0;
    end
    for (int m = 0; m < 2; m++) begin
      scenario(1'(m), 0.0);    // coinciding edges
      scenario(1'(m), 6.0);    // dead time between phases
      scenario(1'(m), -4.0);   // overlapping phases
    end

    $display("pulses=%0d coinciding=%0d dead_time=%0d overlap=%0d",
             n_pulses, n_coincide, n_dead, n_overlap);
    checks += 4;
    if (n_pulses < 100) begin failures++; $display("FAIL too few pulses"); end
    if (n_coincide == 0) begin failures++; $display("FAIL no coinciding crossing"); end
    if (n_dead == 0) begin failures++; $display("FAIL no dead-time crossing"); end
    if (n_overlap == 0) begin failures++; $display("FAIL no overlapping crossing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

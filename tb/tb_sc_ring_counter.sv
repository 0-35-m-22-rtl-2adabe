// Test of the self-correcting counter.
//  1. After reset, one-section mode must step the single 1 through
//     q0..q4 (5 slots per cycle), two-sections mode through q0..q2 and
//     q3..q4 at the same time (3 and 2 slots per cycle).
//  2. Self-correction: unsupported s1..s4 settings are applied for a few
//     clocks to leave arbitrary states; after switching to a supported
//     setting every loop of length L must hold exactly one 1 after L-1
//     clocks and then rotate. The test counts how many such starts were
//     not one-hot and fails if none were.
//  3. Switching modes without reset must also recover.
module tb_sc_ring_counter;
  import clkgen_pkg::*;
  logic clk1 = 1'b1, rst_n = 1'b0;
  clk_cfg_t cfg = CFG_ONE_SECTION;
  logic [N_STAGES-1:0] q;
  int checks = 0, failures = 0, corrections = 0;

  sc_ring_counter dut (.clk1(clk1), .rst_n(rst_n), .cfg(cfg), .q(q));

  always #5 clk1 = ~clk1;

  task automatic step(int k = 1);
    repeat (k) @(negedge clk1);
    #1;
  endtask

  task automatic expect_q(logic [N_STAGES-1:0] e, string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, e);
    end
  endtask

  // Expected state t slots after the start of every loop.
  function automatic logic [N_STAGES-1:0] slot_state(logic two, int t);
    logic [N_STAGES-1:0] e = '0;
    if (!two) e[t % N_STAGES] = 1'b1;
    else begin
      e[t % SPLIT_AT] = 1'b1;
      e[SPLIT_AT + (t % (N_STAGES - SPLIT_AT))] = 1'b1;
    end
    return e;
  endfunction

  function automatic logic legal(logic two, logic [N_STAGES-1:0] s);
    if (!two) return $onehot(s);
    return $onehot(s[SPLIT_AT-1:0]) && $onehot(s[N_STAGES-1:SPLIT_AT]);
  endfunction

  // Rotate each loop's single 1 by one stage.
  function automatic logic [N_STAGES-1:0] rotate(logic two, logic [N_STAGES-1:0] s);
    if (!two) return {s[N_STAGES-2:0], s[N_STAGES-1]};
    return {s[N_STAGES-2:SPLIT_AT], s[N_STAGES-1], s[SPLIT_AT-2:0], s[SPLIT_AT-1]};
  endfunction

  task automatic run_from_reset(logic two);
    rst_n = 1'b0;
    cfg = two ? CFG_TWO_SECTIONS : CFG_ONE_SECTION;
    step(2);
    expect_q('0, "reset");
    rst_n = 1'b1;
    for (int t = 0; t < 4 * N_STAGES; t++) begin
      step();
      expect_q(slot_state(two, t), two ? "two sections" : "one section");
    end
  endtask

  task automatic recover(logic two, string what);
    int lmax;
    logic [N_STAGES-1:0] prev;
    cfg = two ? CFG_TWO_SECTIONS : CFG_ONE_SECTION;
    if (!legal(two, q)) corrections++;
    lmax = two ? SPLIT_AT : N_STAGES;
    step(lmax - 1);
    checks++;
    if (!legal(two, q)) begin
      failures++;
      $display("FAIL %s: q=%b not corrected after %0d clocks", what, q, lmax - 1);
    end
    for (int t = 0; t < 2 * N_STAGES; t++) begin
      prev = q;
      step();
      expect_q(rotate(two, prev), what);
    end
  endtask

  initial begin
    step(2);
    run_from_reset(1'b0);
    run_from_reset(1'b1);
    run_from_reset(1'b0);

    for (int trial = 0; trial < 300; trial++) begin
      cfg = clk_cfg_t'($urandom_range(15));
      step($urandom_range(1, 8));
      recover(1'($urandom_range(1)), "self-correction");
    end

    // Mode changes on the fly, no reset.
    recover(1'b1, "switch to two sections");
    recover(1'b0, "switch to one section");
    recover(1'b1, "switch to two sections");

    $display("non-one-hot starts corrected: %0d", corrections);
    checks++;
    if (corrections == 0) begin
      failures++;
      $display("FAIL self-correction never exercised");
    end
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

// Test of the circular coefficient memory. Random coefficients are loaded
// in both modes; after t steps the word at cell j of a section of length L
// starting at cell b must be h[b + ((t - (j - b)) mod L)], which is worked
// out here from the slot number alone. Steps with shift_en low must leave
// the words in place. Ring wrap-around is counted per mode.
module tb_coef_ring;
  import clkgen_pkg::*;
  logic  clk1 = 1'b1, two_sections = 1'b0, load = 1'b0, shift_en = 1'b0;
  coef_t coef_in [N_STAGES];
  coef_t coef_out [N_STAGES];
  coef_t h [N_STAGES];
  int checks = 0, failures = 0, wraps = 0;

  coef_ring dut (.clk1(clk1), .two_sections(two_sections), .load(load),
                 .shift_en(shift_en), .coef_in(coef_in), .coef_out(coef_out));

  always #5 clk1 = ~clk1;

  task automatic check_slot(int t);
    for (int j = 0; j < int'(N_STAGES); j++) begin
      int b, l;
      coef_t e;
      b = (two_sections && j >= int'(SPLIT_AT)) ? int'(SPLIT_AT) : 0;
      l = !two_sections ? int'(N_STAGES) : (j < int'(SPLIT_AT) ? int'(SPLIT_AT) : int'(N_STAGES - SPLIT_AT));
      e = h[b + ((t - (j - b)) % l + l) % l];
      checks++;
      if (coef_out[j] !== e) begin
        failures++;
        $display("FAIL mode=%b slot=%0d cell=%0d word=%0d expected %0d",
                 two_sections, t, j, coef_out[j], e);
      end
    end
  endtask

  task automatic run_mode(logic two);
    int t = 0;
    two_sections = two;
    foreach (h[k]) begin
      h[k] = coef_t'($urandom);
      coef_in[k] = h[k];
    end
    load = 1'b1;
    @(negedge clk1); #1;
    load = 1'b0;
    check_slot(0);
    for (int s = 0; s < 40; s++) begin
      shift_en = 1'($urandom_range(3) != 0);
      @(negedge clk1); #1;
      if (shift_en) begin
        t++;
        if (t % (two ? int'(SPLIT_AT) : int'(N_STAGES)) == 0) wraps++;
      end
      check_slot(t);
    end
    shift_en = 1'b0;
  endtask

  initial begin
    @(negedge clk1); #1;
    run_mode(1'b0);
    run_mode(1'b1);
    run_mode(1'b0);
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL ring never wrapped");
    end
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

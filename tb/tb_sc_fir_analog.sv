// Test of the behavioural SC FIR model, driven directly with clock phases.
// Each slot writes a random input into the slot's cell (first phase) and
// then evaluates (second phase); the coefficient word at each cell is set
// by the testbench the way the circular memory would present it. The
// outputs are compared with a direct FIR sum over the input history:
//   one section : out1 = sum_{k<5} h[k] x1[t-k]
//   two sections: out1 = sum_{k<3} hA[k] x1[t-k], out2 = sum_{k<2} hB[k] x2[t-k]
// with the word-to-gain scale 1/2^(COEF_W-1), and out2 = 0 in one-section
// mode (second amplifier off).
module tb_sc_fir_analog;
  import clkgen_pkg::*;
  logic                two_sections = 1'b0;
  logic [N_PHASES-1:0] p = '0;
  coef_t               coef [N_STAGES];
  real                 in1 = 0.0, in2 = 0.0, out1, out2;
  coef_t               h [N_STAGES];
  real                 x1 [$], x2 [$];
  int checks = 0, failures = 0;

  sc_fir_analog dut (.two_sections(two_sections), .p(p), .coef(coef),
                     .in1(in1), .in2(in2), .out1(out1), .out2(out2));

  function automatic real gain(coef_t w);
    return real'(w) / real'(1 << (COEF_W - 1));
  endfunction

  function automatic bit close(real a, real b);
    return (a - b < 1e-9) && (b - a < 1e-9);
  endfunction

  task automatic run_mode(logic two, int slots);
    int la, lb;
    two_sections = two;
    la = two ? int'(SPLIT_AT) : int'(N_STAGES);
    lb = int'(N_STAGES) - la;
    foreach (h[k]) h[k] = coef_t'($urandom);
    x1.delete();
    x2.delete();
    // Flush every cell with zeros so the history starts empty.
    for (int t = 0; t < slots; t++) begin
      int ca, cb;
      real ya, yb;
      bit  flush;
      flush = t < int'(N_STAGES);
      ca = t % la;
      cb = (lb > 0) ? la + t % lb : 0;
      in1 = flush ? 0.0 : real'($urandom_range(2000)) / 1000.0 - 1.0;
      in2 = flush ? 0.0 : real'($urandom_range(2000)) / 1000.0 - 1.0;
      x1.push_front(in1);
      x2.push_front(in2);
      // Words as the circular memory places them for this slot.
      for (int j = 0; j < la; j++) coef[j] = h[((ca - j) % la + la) % la];
      for (int j = la; j < int'(N_STAGES); j++) coef[j] = h[la + ((cb - j) % lb + lb) % lb];
      p = '0;
      p[2*ca] = 1'b1;
      if (two) p[2*cb] = 1'b1;
      #5 p = '0;
      #1;
      p[2*ca+1] = 1'b1;
      if (two) p[2*cb+1] = 1'b1;
      #2;
      if (!flush) begin
        ya = 0.0;
        for (int k = 0; k < la; k++) ya += gain(h[k]) * x1[k];
        yb = 0.0;
        for (int k = 0; k < lb; k++) yb += gain(h[la + k]) * x2[k];
        if (!two) yb = 0.0;
        checks++;
        if (!close(out1, ya)) begin
          failures++;
          $display("FAIL mode=%b slot=%0d out1=%f expected %f", two, t, out1, ya);
        end
        checks++;
        if (!close(out2, yb)) begin
          failures++;
          $display("FAIL mode=%b slot=%0d out2=%f expected %f", two, t, out2, yb);
        end
      end
      #3 p = '0;
      #1;
    end
  endtask

  initial begin
    #1;
    run_mode(1'b0, 40);
    run_mode(1'b1, 40);
    run_mode(1'b0, 40);
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

// Exhaustive test of the phase cutter: for every basic-signal pattern q and
// every clk/clk1 level, phase 2i must equal q_i AND clk, phase 2i+1 must
// equal q_i AND clk1, and n must be the complement of p.
module tb_phase_cutter;
  import clkgen_pkg::*;
  logic clk, clk1;
  logic [N_STAGES-1:0] q;
  logic [N_PHASES-1:0] p, n;
  int checks = 0, failures = 0;

  phase_cutter dut (.clk(clk), .clk1(clk1), .q(q), .p(p), .n(n));

  initial begin
    for (int v = 0; v < (1 << (N_STAGES + 2)); v++) begin
      logic [N_PHASES-1:0] exp_p;
      {clk1, clk, q} = (N_STAGES + 2)'(v);
      #1;
      for (int i = 0; i < int'(N_STAGES); i++) begin
        exp_p[2*i]   = q[i] & clk;
        exp_p[2*i+1] = q[i] & clk1;
      end
      checks++;
      if (p !== exp_p || n !== ~exp_p) begin
        failures++;
        $display("FAIL q=%b clk=%b clk1=%b p=%b n=%b expected p=%b", q, clk, clk1, p, n, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

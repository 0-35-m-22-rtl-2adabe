// Phase cutter: turns the basic signals q0..q4 into the real clock phases.
//
// Each basic signal q_i is high for one slot of the counter. Two NAND gates
// cut two phases out of it, one with the external clock clk and one with
// clk1; an inverter after each NAND gives the true phase:
//     n[2i]   = ~(q[i] & clk)     p[2i]   = q[i] & clk
//     n[2i+1] = ~(q[i] & clk1)    p[2i+1] = q[i] & clk1
// (p[0..9] and n[0..9] are the document's p1..p10 and n1..n10.) Because the
// phase edges are those of clk and clk1, the overlap or dead time between
// adjoining phases is set entirely by the external clocks' pulse widths and
// not by flip-flop delays. That scheme is the document's; the assignment of
// clk to the first and clk1 to the second phase of a slot is this design's.
// Purely combinational; a phase is glitch free as long as q only changes
// while clk and clk1 are both low.
module phase_cutter
  import clkgen_pkg::*;
(
  input  logic                clk,
  input  logic                clk1,
  input  logic [N_STAGES-1:0] q,
  output logic [N_PHASES-1:0] p,  // true phases
  output logic [N_PHASES-1:0] n   // complementary phases
);
  always_comb begin
    for (int i = 0; i < int'(N_STAGES); i++) begin
      n[2*i]   = ~(q[i] & clk);
      n[2*i+1] = ~(q[i] & clk1);
    end
    p = ~n;
  end
endmodule

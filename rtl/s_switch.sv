// S cell: the reconfigurable junction of the counter's feedback network.
//
// Two transmission switches, driven by sx and its inverse, decide what the
// cell's gate sees on its second input: in2 when sx = 1, or in1 itself when
// sx = 0. The gate and the output inverter then produce
//     out = sx ? (in1 & in2) : in1
// so the cell either merges a second feedback term into the loop or drops
// it, which is how the feedback loop is cut into independent sections.
// The switch arrangement follows the document's cell drawing; the AND
// combining function (the feedback being active-high "all these stages are
// empty" terms) is this design's reading of it. Purely combinational.
module s_switch (
  input  logic in1,
  input  logic in2,
  input  logic sx,
  output logic out
);
  logic gate_b;  // second gate input, chosen by the two switches

  always_comb begin
    gate_b = sx ? in2 : in1;
    out    = in1 & gate_b;
  end
endmodule

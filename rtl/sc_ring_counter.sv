// Self-correcting D flip-flop counter with a reconfigurable feedback loop.
//
// Five D flip-flops q0..q4 form a shift chain. The first flip-flop of a
// loop is loaded with 1 only when all stages of that loop except its last
// are 0 (an AND of inverted outputs, built from S cells). The loop then
// carries a single 1 that walks down the chain, one stage per clock, and
// any other start state (after power-up or a reconfiguration) is purged
// within (loop length - 1) clocks: the counter needs no reset to work.
//
// Feedback network (three S cells, as in the document's generator drawing):
//   a   = S(s3; in1 = ~q0, in2 = ~q1)
//   b   = S(s1; in1 = ~q3, in2 = ~q2)
//   D0  = S(s2; in1 = a,   in2 = b)
//   D3  = s4 ? q2 : b
// s1..s4 = 1111: one 5-stage loop, D0 = ~(q0|q1|q2|q3)         (5 impulses)
// s1..s4 = 0,0,1,0 (s1,s2,s3,s4): loops q0..q2 with D0 = ~(q0|q1) (3 impulses)
//                                 and q3..q4 with D3 = ~q3        (2 impulses)
// Which inverted output feeds which S input is this design's reading of the
// drawing; the document gives the cells, the s4 switches and the overall
// loop structure. Other settings of s1..s4 are not meaningful and are
// flagged by an assertion in mp_clkgen.
//
// Timing: the flip-flops advance on the falling edge of clk1, the end of the
// second phase of each slot, so q is stable while clk and clk1 are high
// (the document does not say which edge clocks them). rst_n clears all
// stages asynchronously; the first edge after reset then starts every loop
// at its first stage. The document's counter has no reset; it is added here
// only to give a known starting slot.
module sc_ring_counter
  import clkgen_pkg::*;
(
  input  logic                clk1,   // flip-flops advance on its falling edge
  input  logic                rst_n,  // asynchronous, active low
  input  clk_cfg_t            cfg,    // s1..s4
  output logic [N_STAGES-1:0] q       // basic clock signals q0..q4
);
  logic a, b, d0, d3;

  // q4 is the last stage of either loop and never feeds back.
  s_switch u_s3 (.in1(~q[0]), .in2(~q[1]), .sx(cfg.s3), .out(a));
  s_switch u_s1 (.in1(~q[3]), .in2(~q[2]), .sx(cfg.s1), .out(b));
  s_switch u_s2 (.in1(a),     .in2(b),     .sx(cfg.s2), .out(d0));

  assign d3 = cfg.s4 ? q[2] : b;

  always_ff @(negedge clk1 or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= {q[3], d3, q[1], q[0], d0};
  end
endmodule

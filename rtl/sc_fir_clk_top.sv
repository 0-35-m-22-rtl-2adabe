// Circular memory SC FIR filter with its programmable multiphase clock.
//
// mp_clkgen turns the external two-phase clock clk/clk1 into ten phases
// p1..p10 (with complements n1..n10) from five self-correcting counter
// stages. coef_ring circulates the coefficient words past the analog memory
// cells, one step per sample slot, and sc_fir_analog (a behavioural model of
// the analog filter) samples, weights and sums. One control bit
// two_sections reprograms everything at once, as in the document:
//   0: s1..s4 = one loop (10 phases), m1 closed: one 5-tap filter in1 -> out1
//   1: s1..s4 = two loops (6 + 4 phases), m2 closed: a 3-tap filter
//      in1 -> out1 and a 2-tap filter in2 -> out2, running side by side.
// Deriving s1..s4 and m1/m2 from one bit is this design's choice.
//
// Use: hold rst_n low, set two_sections, pulse coef_load over a falling
// clk1 edge with coef_in (h0 first, section by section), release rst_n.
// The first falling clk1 edge after release starts slot 0; every slot is
// one clk1 period. The coefficient ring steps at each falling clk1 edge
// at which some counter stage was set (not on the start-up edge).
module sc_fir_clk_top
  import clkgen_pkg::*;
(
  input  logic                clk,           // external two-phase clock, phase 1
  input  logic                clk1,          // external two-phase clock, phase 2
  input  logic                rst_n,
  input  logic                two_sections,
  input  logic                coef_load,
  input  coef_t               coef_in [N_STAGES],
  input  real                 in1,
  input  real                 in2,
  output real                 out1,
  output real                 out2,
  output logic [N_STAGES-1:0] q,             // basic clock signals q0..q4
  output logic [N_PHASES-1:0] p,             // phases p1..p10
  output logic [N_PHASES-1:0] n              // phases n1..n10
);
  clk_cfg_t cfg;
  coef_t    coef_cell [N_STAGES];

  assign cfg = two_sections ? CFG_TWO_SECTIONS : CFG_ONE_SECTION;

  mp_clkgen u_clkgen (
    .clk  (clk),
    .clk1 (clk1),
    .rst_n(rst_n),
    .cfg  (cfg),
    .q    (q),
    .p    (p),
    .n    (n)
  );

  coef_ring u_coef (
    .clk1        (clk1),
    .two_sections(two_sections),
    .load        (coef_load),
    .shift_en    (|q),
    .coef_in     (coef_in),
    .coef_out    (coef_cell)
  );

  sc_fir_analog u_fir (
    .two_sections(two_sections),
    .p           (p),
    .coef        (coef_cell),
    .in1         (in1),
    .in2         (in2),
    .out1        (out1),
    .out2        (out2)
  );
endmodule

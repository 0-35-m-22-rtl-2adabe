// Programmable multiphase clock generator.
//
// The self-correcting counter (sc_ring_counter) produces the basic signals
// q0..q4, one slot high each; the phase cutter gates them with the external
// two-phase clock clk/clk1 into ten non-overlapping phases p1..p10 with
// complements n1..n10. s1..s4 reconfigure the counter's feedback:
//   CFG_ONE_SECTION : one loop, 5 slots per cycle, phases p1..p10 in turn
//   CFG_TWO_SECTIONS: loop q0..q2 (phases p1..p6, 3 slots per cycle) and
//                     loop q3..q4 (phases p7..p10, 2 slots per cycle), both
//                     running at the same time to clock two filter sections.
// The structure and the two modes follow the document; the counter advances
// on the falling edge of clk1 (this design's choice), so one slot is one
// clk1 period. Only the two listed configurations are supported, which an
// assertion checks at every counter step outside reset.
module mp_clkgen
  import clkgen_pkg::*;
(
  input  logic                clk,    // first phase of each slot
  input  logic                clk1,   // second phase of each slot; counter clock
  input  logic                rst_n,
  input  clk_cfg_t            cfg,    // s1..s4
  output logic [N_STAGES-1:0] q,      // basic clock signals q0..q4
  output logic [N_PHASES-1:0] p,      // phases p1..p10
  output logic [N_PHASES-1:0] n       // complementary phases n1..n10
);
  sc_ring_counter u_cnt (
    .clk1 (clk1),
    .rst_n(rst_n),
    .cfg  (cfg),
    .q    (q)
  );

  phase_cutter u_cut (
    .clk (clk),
    .clk1(clk1),
    .q   (q),
    .p   (p),
    .n   (n)
  );

  a_cfg_valid : assert property (@(negedge clk1) disable iff (!rst_n)
      (cfg == CFG_ONE_SECTION) || (cfg == CFG_TWO_SECTIONS))
    else $error("mp_clkgen: unsupported s1..s4 setting %b", cfg);
endmodule

// Shared constants and types of the programmable multiphase clock generator
// and the circular memory SC FIR filter it drives.
//
// The generator has five D flip-flops (basic signals q0..q4), each of which
// yields two clock phases, ten phases in all. The counter can run as one
// 5-stage loop (one filter section, 10 phases) or be split after the third
// flip-flop into a 3-stage and a 2-stage loop (two sections, 6 + 4 phases).
// These sizes follow the document. The coefficient word width is not given
// there and is this design's choice (8 bits, two's complement).
package clkgen_pkg;

  localparam int unsigned N_STAGES  = 5;             // D flip-flops q0..q4
  localparam int unsigned N_PHASES  = 2 * N_STAGES;  // p1..p10 / n1..n10
  localparam int unsigned SPLIT_AT  = 3;             // first section: q0..q2
  localparam int unsigned COEF_W    = 8;             // n-bit coefficient words

  // Feedback-loop configuration, the controlling signals s1..s4.
  typedef struct packed {
    logic s4;  // 1: chain q2 -> D3 (one loop); 0: D3 takes the second loop's feedback
    logic s3;  // S cell combining the q0/q1 feedback terms
    logic s2;  // S cell joining the two halves of the feedback into D0
    logic s1;  // S cell combining the q2/q3 feedback terms
  } clk_cfg_t;

  // One section: 5-impulse mode, 10 phases.
  localparam clk_cfg_t CFG_ONE_SECTION  = '{s4: 1'b1, s3: 1'b1, s2: 1'b1, s1: 1'b1};
  // Two sections: 3-impulse (6 phases) + 2-impulse (4 phases).
  localparam clk_cfg_t CFG_TWO_SECTIONS = '{s4: 1'b0, s3: 1'b1, s2: 1'b0, s1: 1'b0};

  typedef logic signed [COEF_W-1:0] coef_t;

endpackage

// Behavioural model (not synthesizable logic) of the switched-capacitor
// circular memory FIR filter that the clock generator drives.
//
// The real part is analog: one sample-and-hold capacitor with a buffer op
// amp per memory cell, a programmable capacitor per cell whose value is an
// n-bit coefficient word, and a summing op amp per section that collects
// the charge of all cells through their coefficient capacitors. In
// two-sections mode the switches m1 open and m2 close: the lower cells take
// input in2 and sum into a second output op amp (out2), which is switched
// off in one-section mode. Voltages are modelled here as reals, ideal
// capacitors and op amps, no charge loss.
//
// Circular memory: cell j samples the input and the coefficient words move
// instead of the samples, so after the write of cell c the section output is
//     out = sum over cells j of the section: h_word(j) * cell(j)
// where coef_ring places h[(c - j) mod L] at cell j, giving
// out = sum_k h[k] * x[t - k], an FIR of order L - 1 per section.
//
// Phase use (this design's choice; the document does not map phases to
// switches): in slot i the first phase, p[2i], closes cell i's sampling
// switch; the second phase, p[2i+1], is the evaluate phase in which the
// section output is formed. Coefficient value: word / 2^(COEF_W-1).
// The structure and the two modes follow the document.
module sc_fir_analog
  import clkgen_pkg::*;
(
  input  logic                two_sections,   // m2 closed (1) or m1 closed (0)
  input  logic [N_PHASES-1:0] p,              // clock phases p1..p10
  input  coef_t               coef [N_STAGES],// word at each cell, from coef_ring
  input  real                 in1,
  input  real                 in2,
  output real                 out1,
  output real                 out2
);
  real  vcap [N_STAGES];
  real  out2_amp;         // second section's summing amplifier
  logic wr_any, ev_any;

  always_comb begin
    wr_any = 1'b0;
    ev_any = 1'b0;
    for (int i = 0; i < int'(N_STAGES); i++) begin
      wr_any |= p[2*i];
      ev_any |= p[2*i+1];
    end
  end

  function automatic bit in_sec_b(input int i);
    return two_sections && i >= int'(SPLIT_AT);
  endfunction

  // Sampling: every cell whose write phase is high takes its section input.
  always @(posedge wr_any) begin
    for (int i = 0; i < int'(N_STAGES); i++)
      if (p[2*i]) vcap[i] <= in_sec_b(i) ? in2 : in1;
  end

  // Evaluation: each section whose evaluate phase is high sums its cells.
  always @(posedge ev_any) begin
    real acc_a, acc_b;
    logic ev_a, ev_b;
    acc_a = 0.0;
    acc_b = 0.0;
    ev_a  = 1'b0;
    ev_b  = 1'b0;
    for (int i = 0; i < int'(N_STAGES); i++) begin
      if (p[2*i+1]) begin
        if (in_sec_b(i)) ev_b = 1'b1;
        else             ev_a = 1'b1;
      end
      if (in_sec_b(i)) acc_b += $itor(coef[i]) / real'(1 << (COEF_W - 1)) * vcap[i];
      else             acc_a += $itor(coef[i]) / real'(1 << (COEF_W - 1)) * vcap[i];
    end
    if (ev_a) out1 <= acc_a;
    if (ev_b) out2_amp <= acc_b;
  end

  // Second output amplifier off in one-section mode.
  assign out2 = two_sections ? out2_amp : 0.0;

  initial begin
    out1     = 0.0;
    out2_amp = 0.0;
    foreach (vcap[i]) vcap[i] = 0.0;
  end
endmodule

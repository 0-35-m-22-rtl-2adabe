// Behavioural model of the external two-phase clock that feeds the
// multiphase generator (clk and clk1), with adjustable pulse widths.
//
// One cycle (times in ns, read from the ports at the start of each cycle):
//   clk rises; after w_clk it falls. clk1 rises gap after the fall of clk
//   (gap < 0: clk1 rises -gap before clk falls, i.e. the pulses overlap;
//   gap = 0: the edges coincide). clk1 stays high w_clk1, then after gap2
//   the next cycle starts. gap2 must be positive: the generator's counter
//   steps on the falling edge of clk1 and needs both clocks low then.
// The first cycle starts 1 ns after time zero.
module two_phase_src (
  input  real  w_clk,
  input  real  gap,
  input  real  w_clk1,
  input  real  gap2,
  output logic clk,
  output logic clk1
);
  initial begin
    real w0, g, w1, g2;
    clk  = 1'b0;
    clk1 = 1'b0;
    #1;
    forever begin
      w0 = w_clk;
      g  = gap;
      w1 = w_clk1;
      g2 = gap2;
      if (g2 <= 0.0 || w0 <= 0.0 || w1 <= 0.0 || w1 + g <= 0.0 || w0 + g <= 0.0)
        $error("two_phase_src: unusable timing w_clk=%f gap=%f w_clk1=%f gap2=%f",
               w0, g, w1, g2);
      clk = 1'b1;
      if (g >= 0.0) begin
        #(w0)     clk  = 1'b0;
        #(g)      clk1 = 1'b1;
        #(w1)     clk1 = 1'b0;
      end else begin
        #(w0 + g) clk1 = 1'b1;
        #(-g)     clk  = 1'b0;
        #(w1 + g) clk1 = 1'b0;
      end
      #(g2);
    end
  end
endmodule

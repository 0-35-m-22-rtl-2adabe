// Digital circular memory of the SC FIR coefficients (the "M" ring).
//
// One n-bit coefficient word sits next to each analog memory cell and sets
// that cell's programmable capacitor. The filter writes each new input
// sample into the next cell in turn, so instead of moving samples the words
// move: after every sample slot each word steps to the next cell down the
// ring and the last one wraps to the first. In one-section mode (switches
// m1 closed) all five words form one ring; in two-sections mode (m2 closed)
// the ring is cut into words 0..2 and words 3..4, each circulating on its
// own. This ring and its split follow the document; the load port, the
// coefficient order it takes and the shift timing are this design's.
//
// load: on a falling clk1 edge, coef_in[] (section by section, h0 first)
// is placed for slot 0, i.e. cell b+j of a section starting at b with
// length L receives h[(L - j) mod L]: cell 0 holds h0, cell 1 h(L-1), ...,
// the last cell h1. Load while the clock generator is held in reset; the
// ring then stays aligned with the counter, whose loops all restart at
// their first stage. shift_en: on a falling clk1 edge, rotate by one.
// coef_out[j] is the word applied to cell j. No reset: the words are
// defined by the first load.
module coef_ring
  import clkgen_pkg::*;
(
  input  logic  clk1,                      // steps on its falling edge
  input  logic  two_sections,              // 0: m1 closed, 1: m2 closed
  input  logic  load,
  input  logic  shift_en,
  input  coef_t coef_in  [N_STAGES],
  output coef_t coef_out [N_STAGES]
);
  coef_t mem [N_STAGES];

  // Section of cell j: its first cell and its length.
  function automatic int unsigned sec_base(input logic split, input int unsigned j);
    return (split && j >= SPLIT_AT) ? SPLIT_AT : 0;
  endfunction

  function automatic int unsigned sec_len(input logic split, input int unsigned j);
    if (!split)        return N_STAGES;
    else if (j < SPLIT_AT) return SPLIT_AT;
    else               return N_STAGES - SPLIT_AT;
  endfunction

  always_ff @(negedge clk1) begin
    for (int unsigned j = 0; j < N_STAGES; j++) begin
      int unsigned b, l, off;
      b   = sec_base(two_sections, j);
      l   = sec_len(two_sections, j);
      off = j - b;
      if (load)
        mem[j] <= coef_in[b + ((l - off) % l)];
      else if (shift_en)
        mem[j] <= mem[b + ((off + l - 1) % l)];
    end
  end

  assign coef_out = mem;
endmodule

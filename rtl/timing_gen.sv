// timing_gen: the timing generator of a 4:1 selector stage.
//
// It decodes the two quadrature phases of the 1/4 divider (and their
// complements) into four select pulses S1..S4. Each pulse is a two-input NOR
// of one line from each phase, so exactly one pulse is high in each of the four
// divider states and each lasts one step of the divider. Which pair of lines
// drives which pulse is this design's choice: S1 is state 00, S2 01, S3 11 and
// S4 10, so the pulses follow each other in order S1, S2, S3, S4. The
// complements S1B..S4B are the inverses of S1..S4.
//
// Interface: purely combinational; s[0] is S1.
module timing_gen
  import mux16_pkg::*;
(
  input  logic [1:0] ph,
  input  logic [1:0] phb,
  output sel_t       s,
  output sel_t       sb
);

  always_comb begin
    s[0] = ~(ph[1]  | ph[0]);   // S1: state 00
    s[1] = ~(ph[1]  | phb[0]);  // S2: state 01
    s[2] = ~(phb[1] | phb[0]);  // S3: state 11
    s[3] = ~(phb[1] | ph[0]);   // S4: state 10
    sb   = ~s;
  end

endmodule

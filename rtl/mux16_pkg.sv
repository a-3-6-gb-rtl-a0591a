// mux16_pkg: types and constants shared by the 16:1 multiplexer.
//
// The multiplexer is built from 4:1 selector stages. Every stage is driven by
// a 1/4 divider whose two quadrature phases step through four states; a
// timing generator decodes each state into one of four one-hot select pulses
// S1..S4. This package fixes the select width, the divider state encoding and
// the state-to-select decode, so that all stages agree on it. The decode
// order (S1 = 00, S2 = 01, S3 = 11, S4 = 10) is this design's choice.
package mux16_pkg;

  // Number of inputs of one selector, and of the whole multiplexer.
  localparam int unsigned SEL_N = 4;
  localparam int unsigned MUX_N = SEL_N * SEL_N;

  // One-hot select vector, sel_t[0] = S1 ... sel_t[3] = S4.
  typedef logic [SEL_N-1:0] sel_t;

  // Divider state: {ph[1], ph[0]}; ph[1] is the divided clock CLK/4.
  typedef enum logic [1:0] {
    PH_S1 = 2'b00,
    PH_S2 = 2'b01,
    PH_S3 = 2'b11,
    PH_S4 = 2'b10
  } div_state_e;

endpackage

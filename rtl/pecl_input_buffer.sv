// pecl_input_buffer: behavioural model of a PECL input buffer (not synthesizable
// logic; it stands for an analog circuit).
//
// The circuit is two stages of NMOS current-mirror differential amplifiers that
// turn a small PECL swing into a full-swing logic level. The clock input uses
// it differentially (CLK against CLKB, terminated on chip); the 16 data inputs
// use it single-ended against the external reference VBB (terminated off
// chip). The model is an ideal comparator on real-valued pad voltages:
// q = 1 when v_p is above v_n, else 0. Gain, offset, bandwidth, delay and the
// termination resistors are not modelled.
module pecl_input_buffer (
  input  real  v_p,
  input  real  v_n,
  output logic q
);

  always_comb q = (v_p > v_n);

endmodule

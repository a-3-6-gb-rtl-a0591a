// pecl_output_buffer: behavioural model of the PECL output buffer (not
// synthesizable logic; it stands for an analog driver).
//
// The circuit is a chain of inverters driving a 50 ohm line terminated to
// ground at the far end. For a 0 the NMOS pulls the line to 0 V. For a 1 the
// PMOS on-resistance R_ON and the termination R_TERM divide VDD, so the line
// sits at VDD * R_TERM / (R_TERM + R_ON): 1.11 V with the default 2.0 V supply,
// 40 ohm PMOS and 50 ohm termination, which meets the PECL levels for a 2.0 V
// supply (VOL <= 0.3 V, VOH >= 1.1 V). The model maps the logic input to that
// line voltage with no delay and no edge rate.
module pecl_output_buffer #(
  parameter real VDD    = 2.0,
  parameter real R_ON   = 40.0,
  parameter real R_TERM = 50.0
) (
  input  logic a,
  output real  v_out
);

  localparam real V_OH = VDD * R_TERM / (R_TERM + R_ON);
  localparam real V_OL = 0.0;

  always_comb v_out = a ? V_OH : V_OL;

endmodule

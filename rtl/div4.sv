// div4: 1/4 clock divider with two quadrature phase outputs.
//
// The circuit divides the clock by two in a toggle flip-flop and again by two
// in a flip-flop made of two latches, whose two latch outputs are a quarter of
// a period apart. Here the same two phases are produced by a 2-bit twisted-ring
// counter that steps once per enabled clock: 00, 01, 11, 10, 00, ... Each phase
// is a square wave of four steps; ph[0] leads ph[1] by one step, and ph[1] is
// the divided clock CLK/4 (phb[1] is CLKB/4). All four states lie on the cycle,
// so the counter runs correctly from any starting state; the reset only fixes
// the phase.
//
// Interface: with ce tied to 1 it runs at the input clock rate; a one-cycle
// enable makes it divide a slower clock. rst_n (synchronous, active low,
// this design's addition) returns it to 00.
module div4 (
  input  logic       clk,
  input  logic       ce,
  input  logic       rst_n,
  output logic [1:0] ph,
  output logic [1:0] phb
);

  logic [1:0] ph_next;

  // Twisted ring: the first stage takes the inverted output of the second.
  assign ph_next = {ph[0], ~ph[1]};

  mux_dff #(.W(2), .HAS_RESET(1'b1), .RST_VAL(2'b00)) u_ring (
    .clk  (clk),
    .ce   (ce),
    .rst_n(rst_n),
    .d    (ph_next),
    .q    (ph),
    .qb   (phb)
  );

endmodule

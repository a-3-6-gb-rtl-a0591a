// mux16_chip: the 16:1 multiplexer chip with its PECL pad ring.
//
// The synchronous core (mux16_core) is surrounded by the chip's interface: a
// differential PECL input buffer for the clock (CLK, CLKB), sixteen
// single-ended PECL input buffers for the data pads IN1..IN16 referenced to the
// external voltage VBB, and PECL output buffers for the complementary pairs
// DATA OUT / DATAB OUT, CLK/16 OUT / CLKB/16 OUT and CLK OUT / CLKB OUT. Pad
// voltages are real numbers so that the behavioural buffer models can be
// used; the core between them is synthesizable. v_in[i] is IN(i+1) and feeds
// core input din[i], which is sent i-th within each 16-bit word.
//
// Timing is that of the core: one bit per CLK cycle on DATA OUT, IN1..IN16
// sampled when CLK/16 OUT falls, first bit of a word on DATA OUT 5 CLK cycles
// later. rst_n is a logic-level synchronous reset, this design's addition (the
// chip itself has no reset pad).
module mux16_chip
  import mux16_pkg::*;
#(
  parameter real VDD    = 2.0,
  parameter real R_ON   = 40.0,
  parameter real R_TERM = 50.0
) (
  input  real  v_clk_p,
  input  real  v_clk_n,
  input  real  v_in [MUX_N],
  input  real  v_bb,
  input  logic rst_n,
  output real  v_dout_p,
  output real  v_dout_n,
  output real  v_clk16_p,
  output real  v_clk16_n,
  output real  v_clkout_p,
  output real  v_clkout_n
);

  logic             clk;
  logic [MUX_N-1:0] din;
  logic             dout, doutb, clk16, clkout;

  pecl_input_buffer u_ibuf_clk (.v_p(v_clk_p), .v_n(v_clk_n), .q(clk));

  for (genvar i = 0; i < MUX_N; i++) begin : g_ibuf
    pecl_input_buffer u_ibuf (.v_p(v_in[i]), .v_n(v_bb), .q(din[i]));
  end

  mux16_core u_core (
    .clk      (clk),
    .rst_n    (rst_n),
    .din      (din),
    .dout     (dout),
    .doutb    (doutb),
    .clk16_out(clk16),
    .clkout   (clkout)
  );

  pecl_output_buffer #(.VDD(VDD), .R_ON(R_ON), .R_TERM(R_TERM)) u_obuf_dout_p   (.a(dout),    .v_out(v_dout_p));
  pecl_output_buffer #(.VDD(VDD), .R_ON(R_ON), .R_TERM(R_TERM)) u_obuf_dout_n   (.a(doutb),   .v_out(v_dout_n));
  pecl_output_buffer #(.VDD(VDD), .R_ON(R_ON), .R_TERM(R_TERM)) u_obuf_clk16_p  (.a(clk16),   .v_out(v_clk16_p));
  pecl_output_buffer #(.VDD(VDD), .R_ON(R_ON), .R_TERM(R_TERM)) u_obuf_clk16_n  (.a(~clk16),  .v_out(v_clk16_n));
  pecl_output_buffer #(.VDD(VDD), .R_ON(R_ON), .R_TERM(R_TERM)) u_obuf_clkout_p (.a(clkout),  .v_out(v_clkout_p));
  pecl_output_buffer #(.VDD(VDD), .R_ON(R_ON), .R_TERM(R_TERM)) u_obuf_clkout_n (.a(~clkout), .v_out(v_clkout_n));

endmodule

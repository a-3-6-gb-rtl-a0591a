// mux_dff: the D flip-flop used for every storage element of the multiplexer.
//
// The circuit it stands for is a dual-rail master-slave flip-flop built from
// two pass-transistor latches, with true and complement outputs Q and QB. It is
// written here as one edge-triggered register of W bits on CLK. The enable ce
// is this design's own: a flip-flop that the circuit clocks by a divided clock
// (CLK/4'' or CLK/16'') is clocked here by CLK and enabled in the one cycle in
// which that divided clock has its edge, which gives the same cycle timing
// with a single clock. The complement input DB is taken as ~D.
//
// Interface: d is sampled at the rising edge of clk when ce is 1; q and qb are
// valid one cycle later. With HAS_RESET = 1 a low rst_n loads RST_VAL at the
// next edge (synchronous, regardless of ce); reset is this design's choice.
module mux_dff #(
  parameter int unsigned W         = 1,
  parameter bit          HAS_RESET = 1'b0,
  parameter logic [W-1:0] RST_VAL  = '0
) (
  input  logic         clk,
  input  logic         ce,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic [W-1:0] qb
);

  always_ff @(posedge clk) begin
    if (HAS_RESET && !rst_n) q <= RST_VAL;
    else if (ce)             q <= d;
  end

  assign qb = ~q;

endmodule

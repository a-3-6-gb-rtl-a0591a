// mux_hs_stage: the high-speed 4:1 stage of the multiplexer, pipelined and
// phase-shifted.
//
// One bit leaves DOUT every CLK cycle. A plain 4:1 selector stage has to fit
// divider, timing generator, selector and output set-up into one CLK period.
// This stage cuts that path with flip-flops: two after the 1/4 divider, in
// front of the timing generator, and four after the timing generator, in front
// of the selector. Its longest path is then one flip-flop, one NOR gate and a
// set-up time. A fifth flip-flop retimes the divided clock to CLK/4'', which
// comes from the same divider state as the registered selects, so the two stay
// aligned.
//
// Phase shift: the input flip-flops of D3 and D4 load at the falling edge of
// CLK/4'', those of D1 and D2 at its rising edge, half a CLK/4 period later.
// No extra circuit is needed for this. The registered selects run S1, S2, S3,
// S4, with S1 in the cycle after the falling edge and S3 in the cycle after the
// rising edge (this alignment is this design's choice). So each input flip-flop
// changes two cycles away from both selects that read it: D1''/D2'' change
// while S3/S4 are active and D3''/D4'' while S1/S2 are.
//
// Interface and timing: d[0..3] are D1..D4. D1/D2 are sampled at the edge at
// which clk4pp_rise is 1, D3/D4 at the edge at which clk4pp_fall is 1. The bits
// D1, D2 sampled at one rising edge and D3, D4 sampled at the next falling edge
// leave dout in that order in the four cycles that start three edges after that
// falling edge (selector in the cycle after the falling edge, output flip-flop
// one cycle later). clk4pp is CLK/4'' and the strobes mark its edges for a
// section clocked by it. rst_n (synchronous, this design's addition) sets the
// control flip-flops so that after release the selects continue S4, S1, ...
// without a break.
module mux_hs_stage
  import mux16_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] d,
  output logic       dout,
  output logic       doutb,
  output logic       clk4pp,
  output logic       clk4pp_fall,
  output logic       clk4pp_rise
);

  logic [1:0] ph, phb;        // 1/4 divider outputs
  logic [1:0] ph_d, ph_db;    // after the pipeline flip-flops
  sel_t       s_tg, s_tgb;    // timing generator outputs
  sel_t       sel, selb;      // registered selects S1..S4
  logic       clk4ppb;
  logic [1:0] d12, d12b;      // D1'', D2''
  logic [1:0] d34, d34b;      // D3'', D4''
  logic       sout, soutb;
  logic       dsel  [SEL_N];
  logic       dselb [SEL_N];

  div4 u_div (
    .clk(clk), .ce(1'b1), .rst_n(rst_n), .ph(ph), .phb(phb)
  );

  // Pipeline flip-flops between the divider and the timing generator.
  mux_dff #(.W(2), .HAS_RESET(1'b1), .RST_VAL(PH_S4)) u_ph_pipe (
    .clk(clk), .ce(1'b1), .rst_n(rst_n), .d(ph), .q(ph_d), .qb(ph_db)
  );

  timing_gen u_tg (
    .ph(ph_d), .phb(ph_db), .s(s_tg), .sb(s_tgb)
  );

  // Pipeline flip-flops between the timing generator and the selector.
  mux_dff #(.W(SEL_N), .HAS_RESET(1'b1), .RST_VAL(4'b0100)) u_sel_pipe (
    .clk(clk), .ce(1'b1), .rst_n(rst_n), .d(s_tg), .q(sel), .qb(selb)
  );

  // CLK/4'' retiming flip-flop, fed from the divider pipeline flip-flop.
  mux_dff #(.W(1), .HAS_RESET(1'b1), .RST_VAL(1'b1)) u_clk4pp (
    .clk(clk), .ce(1'b1), .rst_n(rst_n), .d(ph_d[1]), .q(clk4pp), .qb(clk4ppb)
  );

  // Edges of CLK/4'': its input differs from its output.
  assign clk4pp_fall = clk4pp  & ph_db[1];
  assign clk4pp_rise = clk4ppb & ph_d[1];

  // Input flip-flops with the phase shift: D1, D2 on the rising edge,
  // D3, D4 on the falling edge of CLK/4''.
  mux_dff #(.W(2)) u_in12 (
    .clk(clk), .ce(clk4pp_rise), .rst_n(rst_n), .d(d[1:0]), .q(d12), .qb(d12b)
  );
  mux_dff #(.W(2)) u_in34 (
    .clk(clk), .ce(clk4pp_fall), .rst_n(rst_n), .d(d[3:2]), .q(d34), .qb(d34b)
  );

  assign dsel  = '{d12[0],  d12[1],  d34[0],  d34[1]};
  assign dselb = '{d12b[0], d12b[1], d34b[0], d34b[1]};

  sel4 #(.W(1)) u_sel (
    .s(sel), .d(dsel), .db(dselb), .sout(sout), .soutb(soutb)
  );

  // Output flip-flop on CLK.
  mux_dff #(.W(1)) u_out (
    .clk(clk), .ce(1'b1), .rst_n(rst_n), .d(sout), .q(dout), .qb(doutb)
  );

  // The selector's pass transistors must never be opened two at a time.
  a_sel_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(sel))
    else $error("mux_hs_stage: selects not one-hot: %b", sel);

endmodule

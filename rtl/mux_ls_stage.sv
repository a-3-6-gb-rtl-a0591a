// mux_ls_stage: the low-speed section of the multiplexer, four 4:1 selectors
// running at CLK/4''.
//
// It turns four 4-bit groups into four streams at a quarter of the output
// rate, one bit of each group per CLK/4'' period. It is built like the
// high-speed stage with two differences that suit the lower rate: there are no
// pipeline flip-flops between the 1/4 divider and the timing generator (the
// path has four CLK periods and they would only cost power), and all sixteen
// input flip-flops load at the same edge, with no phase shift, which gives the
// external data the widest margin against CLK/16. One divider, one timing
// generator and one 4-bit select flip-flop serve all four selectors. A
// flip-flop fed from the divider retimes the divided clock to CLK/16'', which
// also leaves the chip as CLK/16 OUT.
//
// Interface and timing: every flip-flop here is clocked by CLK and enabled by
// ce, a one-cycle strobe at each edge of CLK/4'' that clocks this section.
// din[k][j] is input j of selector k. All of din is sampled at the edge at
// which load is 1, which is the falling edge of clk16pp (this choice of edge is
// this design's); in the ce period after that edge lout[k] = din[k][0], then
// din[k][1], din[k][2], din[k][3]. rst_n (synchronous, this design's addition)
// sets the control flip-flops so that the first ce after release loads din.
module mux_ls_stage
  import mux16_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  logic             clk,
  input  logic             ce,
  input  logic             rst_n,
  input  logic [3:0]       din [LANES],
  output logic [LANES-1:0] lout,
  output logic             clk16pp,
  output logic             load
);

  logic [1:0] ph, phb;
  sel_t       s_tg, s_tgb;
  sel_t       sel, selb;
  logic       clk16ppb;

  div4 u_div (
    .clk(clk), .ce(ce), .rst_n(rst_n), .ph(ph), .phb(phb)
  );

  // The timing generator is driven by the divider directly.
  timing_gen u_tg (
    .ph(ph), .phb(phb), .s(s_tg), .sb(s_tgb)
  );

  mux_dff #(.W(SEL_N), .HAS_RESET(1'b1), .RST_VAL(4'b1000)) u_sel_pipe (
    .clk(clk), .ce(ce), .rst_n(rst_n), .d(s_tg), .q(sel), .qb(selb)
  );

  // CLK/16'' retiming flip-flop.
  mux_dff #(.W(1), .HAS_RESET(1'b1), .RST_VAL(1'b1)) u_clk16pp (
    .clk(clk), .ce(ce), .rst_n(rst_n), .d(ph[1]), .q(clk16pp), .qb(clk16ppb)
  );

  assign load = ce & clk16pp & phb[1];

  for (genvar k = 0; k < LANES; k++) begin : g_lane
    logic [3:0] w, wb;
    logic       wsel  [SEL_N];
    logic       wselb [SEL_N];
    logic       sout_b;

    // 4-bit input flip-flop, all lanes loaded together.
    mux_dff #(.W(4)) u_in (
      .clk(clk), .ce(load), .rst_n(rst_n), .d(din[k]), .q(w), .qb(wb)
    );

    assign wsel  = '{w[0],  w[1],  w[2],  w[3]};
    assign wselb = '{wb[0], wb[1], wb[2], wb[3]};

    sel4 #(.W(1)) u_sel (
      .s(sel), .d(wsel), .db(wselb), .sout(lout[k]), .soutb(sout_b)
    );
  end

  a_sel_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(sel))
    else $error("mux_ls_stage: selects not one-hot: %b", sel);

endmodule

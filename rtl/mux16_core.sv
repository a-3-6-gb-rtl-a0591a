// mux16_core: synchronous core of the 16:1 multiplexer.
//
// Sixteen parallel bits become one serial stream at the CLK rate in two steps
// of 4:1 selection. The low-speed section (four 4:1 selectors at CLK/4'')
// turns the 16-bit word into four streams; the high-speed stage (one pipelined,
// phase-shifted 4:1 selector at CLK) interleaves them. The high-speed stage
// divides CLK by four and hands the low-speed section its retimed divided clock
// CLK/4''; the low-speed section divides again and returns CLK/16'', which
// frames the words and leaves the chip as CLK/16 OUT. CLKOUT is CLK itself.
//
// The low-speed section advances at the falling edge of CLK/4'' (this design's
// choice). At that edge the high-speed D3/D4 flip-flops take the last bits of
// the ending low-speed period, and D1/D2 took that period's first two bits at
// the rising edge before; so every group of four serial bits comes from one
// low-speed period and every 16 serial bits from one input word.
//
// Bit order (this design's choice): din[i] feeds low-speed selector i mod 4 at
// input i div 4, so DOUT sends din[0] first and din[15] last.
//
// Timing: din is sampled at the clock edge at which clk16_out falls (it must be
// stable around it; changing it at the rising edge of clk16_out is safe). din[i]
// is on dout in the cycle after edge 5 + i counted from that edge (edge 0), so
// the latency is 5 CLK cycles and a word leaves in 16 cycles. rst_n is a
// synchronous reset of the control flip-flops; the first word is loaded 4 cycles
// after its release.
module mux16_core
  import mux16_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [MUX_N-1:0]  din,
  output logic              dout,
  output logic              doutb,
  output logic              clk16_out,
  output logic              clkout
);

  logic       clk4pp, clk4pp_fall, clk4pp_rise;
  logic [3:0] ls_din [SEL_N];
  logic [3:0] lout;
  logic       ls_load;

  for (genvar k = 0; k < SEL_N; k++) begin : g_map
    for (genvar j = 0; j < SEL_N; j++) begin : g_bit
      assign ls_din[k][j] = din[SEL_N*j + k];
    end
  end

  mux_ls_stage #(.LANES(SEL_N)) u_ls (
    .clk    (clk),
    .ce     (clk4pp_fall),
    .rst_n  (rst_n),
    .din    (ls_din),
    .lout   (lout),
    .clk16pp(clk16_out),
    .load   (ls_load)
  );

  mux_hs_stage u_hs (
    .clk        (clk),
    .rst_n      (rst_n),
    .d          (lout),
    .dout       (dout),
    .doutb      (doutb),
    .clk4pp     (clk4pp),
    .clk4pp_fall(clk4pp_fall),
    .clk4pp_rise(clk4pp_rise)
  );

  assign clkout = clk;

endmodule

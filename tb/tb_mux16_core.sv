// tb_mux16_core: end-to-end test of the synchronous 16:1 multiplexer core.
//
// Part 1 holds all sixteen inputs at fixed levels chosen so that DOUT repeats
// 1 0 1 1 1 0 1 0 1 0 1 1 0 0 1 0 (din[0] first), a pattern used to show the
// chip running with static inputs, and checks 8 repetitions of it. Part 2
// applies a new random word every 16 cycles, changed at the rising edge of
// CLK/16 OUT as a system would, and checks every serial bit.
//
// The schedule is predicted from the reset release alone: counting the first
// edge with rst_n high as edge 0, words are sampled at edges 1, 17, 33, ...,
// where clk16_out must fall, and bit i of the word sampled at edge L must be
// on dout (and its complement on doutb) after edge L + 5 + i. This checks the
// 16-cycle word rate and the 5-cycle latency. It also counts, through
// hierarchical references, the word loads, the phase-shifted D1/D2 loads and
// the D3/D4 loads of the high-speed stage, and fails if any never happened.
module tb_mux16_core;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [15:0] din;
  logic        dout, doutb, clk16_out, clkout;
  int checks = 0, failures = 0, cycles = 0;
  int n_words = 0, n_rise = 0, n_fall = 0, n_ls_loads = 0;
  logic exp_bit [int];

  localparam logic [15:0] FIG_PATTERN = 16'b0100_1101_0101_1101; // bit 0 sent first

  mux16_core dut (
    .clk(clk), .rst_n(rst_n), .din(din), .dout(dout), .doutb(doutb),
    .clk16_out(clk16_out), .clkout(clkout)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n) begin
      n_rise     += int'(dut.u_hs.clk4pp_rise);
      n_fall     += int'(dut.u_hs.clk4pp_fall);
      n_ls_loads += int'(dut.u_ls.load);
    end
  end

  task automatic run(input int n_edges, input bit random_words, input bit record, inout int e);
    repeat (n_edges) begin
      // Change the word half-way between two sampling edges.
      if (random_words && e % 16 == 9) din = 16'($urandom);
      if (record && e % 16 == 1) begin
        for (int i = 0; i < 16; i++) exp_bit[e + 5 + i] = din[i];
        n_words++;
      end
      @(posedge clk); #1;
      checks++;
      if (clkout !== clk) begin
        failures++;
        $display("FAIL clkout does not follow clk");
      end
      if (e % 16 == 1 || e % 16 == 9) begin
        checks++;
        if (clk16_out !== (e % 16 == 9)) begin
          failures++;
          $display("FAIL edge %0d: clk16_out=%b", e, clk16_out);
        end
      end
      if (exp_bit.exists(e)) begin
        checks++;
        if (dout !== exp_bit[e] || doutb !== ~exp_bit[e]) begin
          failures++;
          $display("FAIL edge %0d: dout=%b expected %b", e, dout, exp_bit[e]);
        end
        exp_bit.delete(e);
      end
      e++;
      @(negedge clk);
    end
  endtask

  initial begin
    int e;
    rst_n = 1'b0; din = FIG_PATTERN;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    e = 0;
    run(8 * 16, 1'b0, 1'b1, e);
    run(60 * 16, 1'b1, 1'b1, e);
    run(24, 1'b0, 1'b0, e);  // drain the last word
    checks++;
    if (n_words < 60 || n_rise == 0 || n_fall == 0 || n_ls_loads == 0 || exp_bit.size() != 0) begin
      failures++;
      $display("FAIL mechanism counts: words=%0d rise=%0d fall=%0d ls=%0d pending=%0d",
               n_words, n_rise, n_fall, n_ls_loads, exp_bit.size());
    end
    $display("words=%0d phase-shifted D1/D2 loads=%0d D3/D4 loads=%0d low-speed loads=%0d",
             n_words, n_rise, n_fall, n_ls_loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule

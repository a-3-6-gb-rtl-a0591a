// tb_mux16_chip: end-to-end test of the whole chip at its pads, with all
// parameters at their defaults.
//
// The clock is applied as a differential PECL pair (1.1 V / 0.3 V), the
// sixteen data inputs as single-ended PECL levels against VBB = 0.7 V, and the
// outputs are read as voltages on 50 ohm terminated lines: a 1 must be
// 2.0 * 50 / (50 + 40) = 1.111 V, a 0 must be 0 V, and each complementary pad
// must carry the opposite level.
//
// Part 1 holds the inputs static so that DATA OUT repeats
// 1 0 1 1 1 0 1 0 1 0 1 1 0 0 1 0 (IN1 first) and checks 8 repetitions. Part 2
// sends random words, changed at the rising edge of CLK/16 OUT. Counting the
// first clock edge with rst_n high as edge 0, words are sampled at edges 1, 17,
// 33, ... (where CLK/16 OUT falls) and IN(i+1) of the word sampled at edge L is
// expected on DATA OUT after edge L + 5 + i. The testbench counts word loads,
// phase-shifted D1/D2 loads, D3/D4 loads and low-speed loads and fails if any
// mechanism never happened.
module tb_mux16_chip;
  localparam real V_HI = 1.1, V_LO = 0.3, V_BB = 0.7;
  localparam real V_OH = 2.0 * 50.0 / 90.0;

  logic clk_l = 1'b0;
  logic rst_n;
  real  v_clk_p, v_clk_n, v_bb;
  real  v_in [16];
  real  v_dout_p, v_dout_n, v_clk16_p, v_clk16_n, v_clkout_p, v_clkout_n;
  logic [15:0] word;
  int checks = 0, failures = 0, cycles = 0;
  int n_words = 0, n_rise = 0, n_fall = 0, n_ls_loads = 0;
  logic exp_bit [int];

  localparam logic [15:0] FIG_PATTERN = 16'b0100_1101_0101_1101; // IN1 = bit 0

  mux16_chip dut (
    .v_clk_p(v_clk_p), .v_clk_n(v_clk_n), .v_in(v_in), .v_bb(v_bb), .rst_n(rst_n),
    .v_dout_p(v_dout_p), .v_dout_n(v_dout_n), .v_clk16_p(v_clk16_p),
    .v_clk16_n(v_clk16_n), .v_clkout_p(v_clkout_p), .v_clkout_n(v_clkout_n)
  );

  always #5 clk_l = ~clk_l;
  always_comb begin
    v_clk_p = clk_l ? V_HI : V_LO;
    v_clk_n = clk_l ? V_LO : V_HI;
  end

  always @(posedge clk_l) begin
    if (rst_n) begin
      n_rise     += int'(dut.u_core.u_hs.clk4pp_rise);
      n_fall     += int'(dut.u_core.u_hs.clk4pp_fall);
      n_ls_loads += int'(dut.u_core.u_ls.load);
    end
  end

  function automatic bit level(input real v, input logic b);
    real t;
    t = b ? V_OH : 0.0;
    return (v - t < 0.001) && (t - v < 0.001);
  endfunction

  task automatic drive(input logic [15:0] w);
    word = w;
    for (int i = 0; i < 16; i++) v_in[i] = w[i] ? V_HI : V_LO;
  endtask

  task automatic run(input int n_edges, input bit random_words, input bit record, inout int e);
    repeat (n_edges) begin
      if (random_words && e % 16 == 9) drive(16'($urandom));
      if (record && e % 16 == 1) begin
        for (int i = 0; i < 16; i++) exp_bit[e + 5 + i] = word[i];
        n_words++;
      end
      @(posedge clk_l); #1;
      checks++;
      if (!level(v_clkout_p, 1'b1) || !level(v_clkout_n, 1'b0)) begin
        failures++;
        $display("FAIL CLK OUT pads %f/%f", v_clkout_p, v_clkout_n);
      end
      if (e % 16 == 1 || e % 16 == 9) begin
        checks++;
        if (!level(v_clk16_p, e % 16 == 9) || !level(v_clk16_n, e % 16 != 9)) begin
          failures++;
          $display("FAIL edge %0d: CLK/16 OUT pads %f/%f", e, v_clk16_p, v_clk16_n);
        end
      end
      if (exp_bit.exists(e)) begin
        checks++;
        if (!level(v_dout_p, exp_bit[e]) || !level(v_dout_n, !exp_bit[e])) begin
          failures++;
          $display("FAIL edge %0d: DATA OUT pads %f/%f expected bit %b",
                   e, v_dout_p, v_dout_n, exp_bit[e]);
        end
        exp_bit.delete(e);
      end
      e++;
      @(negedge clk_l);
    end
  endtask

  initial begin
    int e;
    v_bb = V_BB;
    rst_n = 1'b0;
    drive(FIG_PATTERN);
    repeat (3) @(posedge clk_l);
    @(negedge clk_l); rst_n = 1'b1;
    e = 0;
    run(8 * 16, 1'b0, 1'b1, e);
    run(100 * 16, 1'b1, 1'b1, e);
    run(24, 1'b0, 1'b0, e);
    checks++;
    if (n_words < 100 || n_rise == 0 || n_fall == 0 || n_ls_loads == 0 || exp_bit.size() != 0) begin
      failures++;
      $display("FAIL mechanism counts: words=%0d rise=%0d fall=%0d ls=%0d pending=%0d",
               n_words, n_rise, n_fall, n_ls_loads, exp_bit.size());
    end
    $display("words=%0d phase-shifted D1/D2 loads=%0d D3/D4 loads=%0d low-speed loads=%0d",
             n_words, n_rise, n_fall, n_ls_loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_l) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule

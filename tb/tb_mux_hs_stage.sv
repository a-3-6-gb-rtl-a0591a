// tb_mux_hs_stage: self-checking test of the high-speed 4:1 stage.
//
// The inputs D1..D4 change to random values every clock cycle, so the test
// sees at which edge each input flip-flop samples. The testbench predicts the
// stage's schedule from the reset release on its own: counting the first edge
// with rst_n high as edge 0, CLK/4'' falls at edges 1, 5, 9, ... and rises at
// edges 3, 7, 11, ... (period 4 cycles). D1/D2 are sampled at a rising edge,
// D3/D4 at the following falling edge F, and the four bits must appear on dout
// in order after edges F+1 .. F+4 (pipeline latency), with doutb = ~dout. It
// also checks the CLK/4'' level and both edge strobes, and counts how often
// the phase-shifted (rising-edge) and the falling-edge loads took effect.
module tb_mux_hs_stage;
  logic       clk = 1'b0;
  logic       rst_n;
  logic [3:0] d;
  logic       dout, doutb, clk4pp, fall, rise;
  int checks = 0, failures = 0, cycles = 0;
  int n_rise_loads = 0, n_fall_loads = 0;

  mux_hs_stage dut (
    .clk(clk), .rst_n(rst_n), .d(d), .dout(dout), .doutb(doutb),
    .clk4pp(clk4pp), .clk4pp_fall(fall), .clk4pp_rise(rise)
  );

  always #5 clk = ~clk;

  // expected[e] = bit expected on dout after edge e
  logic exp_bit [int];
  logic [1:0] got12;

  initial begin
    int e;
    rst_n = 1'b0; d = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    e = 0;
    repeat (400) begin
      d = 4'($urandom);
      // Strobes are combinational; check them before the edge they mark.
      #1;
      checks++;
      if (fall !== (e % 4 == 1) || rise !== (e % 4 == 3)) begin
        failures++;
        $display("FAIL edge %0d: fall=%b rise=%b", e, fall, rise);
      end
      if (e % 4 == 3) begin
        got12 = d[1:0];
        n_rise_loads++;
      end
      if (e % 4 == 1 && e > 1) begin
        exp_bit[e+1] = got12[0];
        exp_bit[e+2] = got12[1];
        exp_bit[e+3] = d[2];
        exp_bit[e+4] = d[3];
        n_fall_loads++;
      end
      @(posedge clk); #1;
      // CLK/4'' is low for edges 1,2 and high for edges 3,4 (mod 4).
      checks++;
      if (clk4pp !== (e % 4 == 3 || e % 4 == 0)) begin
        failures++;
        $display("FAIL edge %0d: clk4pp=%b", e, clk4pp);
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
    checks++;
    if (n_rise_loads == 0 || n_fall_loads == 0) begin
      failures++;
      $display("FAIL a load mechanism never ran");
    end
    $display("rising-edge (phase-shifted) loads: %0d, falling-edge loads: %0d",
             n_rise_loads, n_fall_loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles > 3000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule

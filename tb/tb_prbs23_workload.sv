// tb_prbs23_workload: runs a full period of a 2^23-1 pseudo-random bit
// sequence through the 16:1 multiplexer core.
//
// The sequence is the ITU-T O.150 PRBS23 (x^23 + x^18 + 1), the pattern used
// for bit-error-rate measurements of serial links; it contains runs of 1 to 23
// equal bits, which exercise the data paths with both long constant stretches
// and alternating bits. The testbench cuts the sequence into 16-bit words,
// bit k of the sequence going to din[k mod 16], applies a new word every 16
// cycles, and compares every serial output bit with a second, independent copy
// of the generator (5-cycle latency from the CLK/16 OUT falling edge, as in
// the core's own test). It counts bit errors and reports the longest runs of
// ones and zeros seen on DOUT, which must be 23 and 22 for this sequence.
module tb_prbs23_workload;
  localparam int unsigned N_BITS = (1 << 23) - 1;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [15:0] din;
  logic        dout, doutb, clk16_out, clkout;
  logic [22:0] gen_lfsr, chk_lfsr;
  int checks = 0, failures = 0;
  int unsigned n_checked = 0, run_len = 0, max_run1 = 0, max_run0 = 0, errors = 0;
  logic        last_bit = 1'b0;
  longint unsigned cycles = 0;

  mux16_core dut (
    .clk(clk), .rst_n(rst_n), .din(din), .dout(dout), .doutb(doutb),
    .clk16_out(clk16_out), .clkout(clkout)
  );

  always #5 clk = ~clk;

  // One step of PRBS23: output the top bit, feed back taps 23 and 18.
  function automatic logic [22:0] prbs_step(input logic [22:0] s);
    return {s[21:0], s[22] ^ s[17]};
  endfunction

  task automatic next_word(inout logic [22:0] s, output logic [15:0] w);
    for (int i = 0; i < 16; i++) begin
      w[i] = s[22];
      s    = prbs_step(s);
    end
  endtask

  initial begin
    int unsigned e;
    logic [15:0] w;
    gen_lfsr = 23'h7FFFFF;
    chk_lfsr = 23'h7FFFFF;
    rst_n = 1'b0;
    next_word(gen_lfsr, w);
    din = w;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    e = 0;
    while (n_checked < N_BITS) begin
      // Next word half-way between sampling edges 1, 17, 33, ...
      if (e % 16 == 9) begin
        next_word(gen_lfsr, w);
        din = w;
      end
      @(posedge clk); #1;
      // The word sampled at edge 1 + 16m is on dout after edges 6 + 16m ...
      if (e >= 6) begin
        logic expb;
        expb = chk_lfsr[22];
        chk_lfsr = prbs_step(chk_lfsr);
        checks++;
        if (dout !== expb || doutb !== ~expb) begin
          errors++;
          failures++;
        end
        if (n_checked == 0 || dout != last_bit) run_len = 1;
        else run_len++;
        if (dout && run_len > max_run1) max_run1 = run_len;
        if (!dout && run_len > max_run0) max_run0 = run_len;
        last_bit = dout;
        n_checked++;
      end
      e++;
      @(negedge clk);
    end
    checks++;
    if (max_run1 != 23 || max_run0 != 22) failures++;
    $display("PRBS23: %0d bits, %0d errors, longest runs: %0d ones, %0d zeros",
             n_checked, errors, max_run1, max_run0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles > 64'd9_000_000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule

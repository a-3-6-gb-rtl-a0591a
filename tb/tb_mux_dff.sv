// tb_mux_dff: self-checking test of the flip-flop mux_dff.
//
// Drives random data, enable and reset into an 8-bit instance with reset value
// 8'hA5 and a 1-bit instance without reset, and compares q and qb every cycle
// with a reference register kept in the testbench: q takes d one edge after an
// enabled edge, holds when ce is 0, takes RST_VAL when rst_n is low (reset
// instance only), and qb is always ~q.
module tb_mux_dff;
  logic       clk = 1'b0;
  logic       ce, rst_n;
  logic [7:0] d, q, qb, ref_q;
  logic       d1, q1, qb1, ref_q1;
  int checks = 0, failures = 0;
  int cycles = 0;

  mux_dff #(.W(8), .HAS_RESET(1'b1), .RST_VAL(8'hA5)) dut (
    .clk(clk), .ce(ce), .rst_n(rst_n), .d(d), .q(q), .qb(qb)
  );
  mux_dff dut1 (.clk(clk), .ce(ce), .rst_n(rst_n), .d(d1), .q(q1), .qb(qb1));

  always #5 clk = ~clk;

  initial begin
    ce = 1'b1; rst_n = 1'b0; d = 8'h00; d1 = 1'b0;
    @(posedge clk);
    ref_q = 8'hA5; ref_q1 = d1;
    repeat (400) begin
      @(negedge clk);
      ce    = ($urandom_range(0, 3) != 0);
      rst_n = ($urandom_range(0, 9) != 0);
      d     = 8'($urandom);
      d1    = 1'($urandom);
      @(posedge clk);
      if (!rst_n)  ref_q = 8'hA5;
      else if (ce) ref_q = d;
      if (ce) ref_q1 = d1;
      #1;
      checks++;
      if (q !== ref_q || qb !== ~ref_q) begin
        failures++;
        $display("FAIL q=%h qb=%h expected %h", q, qb, ref_q);
      end
      checks++;
      if (q1 !== ref_q1 || qb1 !== ~ref_q1) begin
        failures++;
        $display("FAIL q1=%b expected %b", q1, ref_q1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles > 2000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule

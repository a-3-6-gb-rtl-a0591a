// tb_div4: self-checking test of the 1/4 divider div4.
//
// Checks the reset state, the state sequence 00, 01, 11, 10 on enabled edges,
// that a disabled edge holds the state, that phb is the complement, and that
// with ce = 1 each phase has a period of exactly 4 clock cycles with ph[0]
// leading ph[1] by one cycle.
module tb_div4;
  logic       clk = 1'b0;
  logic       ce, rst_n;
  logic [1:0] ph, phb, ref_ph;
  int checks = 0, failures = 0, cycles = 0;
  int last_rise1 = -1, last_rise0 = -1, n = 0;
  logic prev1 = 1'b1, prev0 = 1'b1;

  div4 dut (.clk(clk), .ce(ce), .rst_n(rst_n), .ph(ph), .phb(phb));

  always #5 clk = ~clk;

  function automatic logic [1:0] step(input logic [1:0] s);
    case (s)
      2'b00:   return 2'b01;
      2'b01:   return 2'b11;
      2'b11:   return 2'b10;
      default: return 2'b00;
    endcase
  endfunction

  task automatic check(input logic [1:0] exp);
    checks++;
    if (ph !== exp || phb !== ~exp) begin
      failures++;
      $display("FAIL ph=%b phb=%b expected %b", ph, phb, exp);
    end
  endtask

  initial begin
    ce = 1'b1; rst_n = 1'b0;
    @(posedge clk); #1;
    check(2'b00);
    ref_ph = 2'b00;
    // Random enables, occasional reset.
    repeat (200) begin
      @(negedge clk);
      ce    = 1'($urandom);
      rst_n = ($urandom_range(0, 19) != 0);
      @(posedge clk);
      if (!rst_n)  ref_ph = 2'b00;
      else if (ce) ref_ph = step(ref_ph);
      #1 check(ref_ph);
    end
    // Free running: measure the period of both phases.
    @(negedge clk); ce = 1'b1; rst_n = 1'b1;
    repeat (40) begin
      @(posedge clk); #1;
      n++;
      if (ph[1] && !prev1) begin
        if (last_rise1 >= 0) begin
          checks++;
          if (n - last_rise1 != 4) begin
            failures++;
            $display("FAIL CLK/4 period %0d", n - last_rise1);
          end
        end
        checks++;
        if (last_rise0 != n - 1) begin
          failures++;
          $display("FAIL ph[0] does not lead ph[1] by one cycle");
        end
        last_rise1 = n;
      end
      if (ph[0] && !prev0) last_rise0 = n;
      prev1 = ph[1];
      prev0 = ph[0];
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

// tb_timing_gen: self-checking test of the timing generator timing_gen.
//
// Applies all four divider states (with consistent complements) and compares
// S1..S4 with a one-hot table written out here: state 00 -> S1, 01 -> S2,
// 11 -> S3, 10 -> S4; SB must be the complement. Also checks that the four
// states in divider order give S1, S2, S3, S4 in turn.
module tb_timing_gen;
  logic [1:0] ph, phb;
  logic [3:0] s, sb;
  int checks = 0, failures = 0;

  timing_gen dut (.ph(ph), .phb(phb), .s(s), .sb(sb));

  function automatic logic [3:0] expect_sel(input logic [1:0] st);
    case (st)
      2'b00:   return 4'b0001;
      2'b01:   return 4'b0010;
      2'b11:   return 4'b0100;
      default: return 4'b1000;
    endcase
  endfunction

  initial begin
    logic [1:0] seq [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < 4; i++) begin
        ph = seq[i]; phb = ~seq[i];
        #1;
        checks++;
        if (s !== expect_sel(seq[i]) || sb !== ~expect_sel(seq[i])) begin
          failures++;
          $display("FAIL state %b: s=%b sb=%b", seq[i], s, sb);
        end
        checks++;
        if (s !== 4'(1 << i)) begin
          failures++;
          $display("FAIL step %0d gives s=%b", i, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sel4: self-checking test of the dual-rail 4:1 selector sel4.
//
// Uses a 1-bit and a 3-bit instance. For random data and every one-hot select
// it checks that SOUT carries the selected D and SOUTB the selected DB; with
// no select active both rails must be 0.
module tb_sel4;
  logic [3:0] s;
  logic       d1  [4], db1 [4];
  logic       so1, sob1;
  logic [2:0] d3  [4], db3 [4];
  logic [2:0] so3, sob3;
  int checks = 0, failures = 0;

  sel4 #(.W(1)) dut1 (.s(s), .d(d1), .db(db1), .sout(so1), .soutb(sob1));
  sel4 #(.W(3)) dut3 (.s(s), .d(d3), .db(db3), .sout(so3), .soutb(sob3));

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 4; i++) begin
        d1[i] = 1'($urandom); db1[i] = ~d1[i];
        d3[i] = 3'($urandom); db3[i] = 3'($urandom);
      end
      for (int k = 0; k < 4; k++) begin
        s = 4'(1 << k);
        #1;
        checks++;
        if (so1 !== d1[k] || sob1 !== db1[k] || so3 !== d3[k] || sob3 !== db3[k]) begin
          failures++;
          $display("FAIL sel %0d: %b/%b %h/%h", k, so1, sob1, so3, sob3);
        end
      end
      s = 4'b0000;
      #1;
      checks++;
      if (so1 !== 1'b0 || sob1 !== 1'b0 || so3 !== 3'b0 || sob3 !== 3'b0) begin
        failures++;
        $display("FAIL idle rails not 0");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

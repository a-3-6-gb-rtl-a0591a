// tb_pecl_output_buffer: checks the behavioural PECL output buffer model.
//
// With the default 2.0 V supply, 40 ohm PMOS and 50 ohm termination a 1 must
// drive 2.0 * 50 / 90 = 1.111 V (at least the 1.1 V PECL high level) and a 0
// must drive 0 V (at most the 0.3 V low level). A second instance at a 1.8 V
// supply must scale the high level to 1.0 V.
module tb_pecl_output_buffer;
  logic a;
  real  v, v18;
  int checks = 0, failures = 0;

  pecl_output_buffer dut (.a(a), .v_out(v));
  pecl_output_buffer #(.VDD(1.8)) dut18 (.a(a), .v_out(v18));

  function automatic bit near(input real x, input real y);
    return (x - y < 0.001) && (y - x < 0.001);
  endfunction

  initial begin
    for (int i = 0; i < 10; i++) begin
      a = 1'(i % 2);
      #1;
      checks++;
      if (a ? !(near(v, 2.0 * 50.0 / 90.0) && v >= 1.1 && near(v18, 1.0))
            : !(near(v, 0.0) && near(v18, 0.0))) begin
        failures++;
        $display("FAIL a=%b gives %f V / %f V", a, v, v18);
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

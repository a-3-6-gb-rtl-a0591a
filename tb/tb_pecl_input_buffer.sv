// tb_pecl_input_buffer: checks the behavioural PECL input buffer model.
//
// Differential use: CLK/CLKB swinging between 0.3 V and 1.1 V must give full
// logic levels of the right polarity. Single-ended use: a data input at random
// voltages around a 0.7 V reference must give 1 exactly when it is above the
// reference.
module tb_pecl_input_buffer;
  real  vp, vn;
  logic q;
  int checks = 0, failures = 0;

  pecl_input_buffer dut (.v_p(vp), .v_n(vn), .q(q));

  initial begin
    for (int i = 0; i < 20; i++) begin
      vp = (i % 2) ? 1.1 : 0.3;
      vn = (i % 2) ? 0.3 : 1.1;
      #1;
      checks++;
      if (q !== 1'(i % 2)) begin
        failures++;
        $display("FAIL differential %f/%f gives %b", vp, vn, q);
      end
    end
    vn = 0.7;
    for (int i = 0; i < 200; i++) begin
      vp = 0.2 + real'($urandom_range(0, 1000)) / 1000.0;
      #1;
      checks++;
      if (q !== (vp > 0.7)) begin
        failures++;
        $display("FAIL single-ended %f against 0.7 gives %b", vp, q);
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

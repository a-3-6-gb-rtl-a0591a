// tb_mux_ls_stage: self-checking test of the low-speed section.
//
// The testbench generates the enable ce itself, one cycle in four as CLK/4''
// would, and changes all sixteen inputs to random values every cycle. Counting
// the enabled edges after the reset release from 0, it expects the input
// flip-flops to load at enabled edges 0, 4, 8, ... (load strobe high, clk16pp
// falling there), and in the four enable periods after a load at edge L it
// expects lout[k] = din[k][j] in period j = 0..3, with din as sampled at L.
// It also checks that clk16pp has a period of 16 clock cycles and that the
// section holds its outputs between enables.
module tb_mux_ls_stage;
  logic       clk = 1'b0;
  logic       ce, rst_n;
  logic [3:0] din [4];
  logic [3:0] lout;
  logic       clk16pp, load;
  logic [3:0] word [4];
  int checks = 0, failures = 0, cycles = 0, n_loads = 0;

  mux_ls_stage #(.LANES(4)) dut (
    .clk(clk), .ce(ce), .rst_n(rst_n), .din(din), .lout(lout),
    .clk16pp(clk16pp), .load(load)
  );

  always #5 clk = ~clk;

  initial begin
    int c, k_en;
    logic [3:0] held;
    rst_n = 1'b0; ce = 1'b0;
    foreach (din[k]) din[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    c = 0; k_en = 0;
    repeat (640) begin
      foreach (din[k]) din[k] = 4'($urandom);
      ce = (c % 4 == 0);
      #1;
      if (ce) begin
        checks++;
        if (load !== (k_en % 4 == 0)) begin
          failures++;
          $display("FAIL enable %0d: load=%b", k_en, load);
        end
        if (k_en % 4 == 0) begin
          word = din;
          n_loads++;
        end
      end else begin
        checks++;
        if (load !== 1'b0) begin
          failures++;
          $display("FAIL load strobe without enable");
        end
      end
      held = lout;
      @(posedge clk); #1;
      if (ce) begin
        // After enabled edge k_en: period j = k_en % 4 of the current word.
        checks++;
        for (int k = 0; k < 4; k++)
          if (lout[k] !== word[k][k_en % 4]) begin
            failures++;
            $display("FAIL enable %0d lane %0d: lout=%b", k_en, k, lout[k]);
            break;
          end
        checks++;
        if (clk16pp !== (k_en % 4 >= 2)) begin
          failures++;
          $display("FAIL enable %0d: clk16pp=%b", k_en, clk16pp);
        end
        k_en++;
      end else if (c > 0) begin
        checks++;
        if (lout !== held) begin
          failures++;
          $display("FAIL outputs changed without enable");
        end
      end
      c++;
      @(negedge clk);
    end
    checks++;
    if (n_loads < 2) begin
      failures++;
      $display("FAIL too few word loads");
    end
    $display("word loads: %0d", n_loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles > 5000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule

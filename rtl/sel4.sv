// sel4: dual-rail 4:1 selector.
//
// The circuit is a pass-transistor selector: each one-hot select S1..S4 opens
// one pass transistor on the true rail (D1''..D4'' onto SOUT) and one on the
// complement rail (D1B''..D4B'' onto SOUTB); a cross-coupled PMOS pair restores
// the levels. Here each rail is an AND-OR of selects and data, W bits wide.
// With no select active both rails are 0. The selects must be one-hot (two
// open pass transistors would short two data lines); the stages that drive
// them check this with a clocked assertion.
//
// Interface: combinational; s[0] selects d[0] (D1'').
module sel4
  import mux16_pkg::*;
#(
  parameter int unsigned W = 1
) (
  input  sel_t         s,
  input  logic [W-1:0] d  [SEL_N],
  input  logic [W-1:0] db [SEL_N],
  output logic [W-1:0] sout,
  output logic [W-1:0] soutb
);

  always_comb begin
    sout  = '0;
    soutb = '0;
    for (int i = 0; i < SEL_N; i++) begin
      sout  |= {W{s[i]}} & d[i];
      soutb |= {W{s[i]}} & db[i];
    end
  end

endmodule

// Fault-injection decoder. Turns one fault descriptor (line index, stuck
// value, enable) into the {SelA,SelB} select pair of every fault-injection
// mux of the module under test, so that at most one line is faulty at a time
// (single stuck-at fault model). Lines not addressed get the pass code 00.
// Combinational. sel[i] bit 1 is SelA, bit 0 is SelB of line i.
module fault_injector
  import bist_pkg::*;
#(
  parameter int unsigned N_LINES = C17_N_LINES
) (
  input  logic              en,      // 0: fault-free run
  input  logic [LINE_W-1:0] line,    // line to fault
  input  stuck_e            stuck,   // stuck-at value
  output logic [1:0]        sel [N_LINES]
);
  always_comb begin
    for (int i = 0; i < N_LINES; i++) begin
      sel[i] = SEL_PASS;
      if (en && (line == LINE_W'(i)))
        sel[i] = (stuck == SA1) ? SEL_FORCE1 : SEL_FORCE0;
    end
  end
endmodule

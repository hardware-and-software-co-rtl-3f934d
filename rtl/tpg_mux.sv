// Test-source multiplexer. The select line chooses the pseudorandom (0) or
// the deterministic (1) pattern generator as the test source: the chosen
// generator's pattern and valid go to the module under test, and the
// consume strobe goes only to the chosen generator. Restart reaches both.
// Combinational.
module tpg_mux
  import bist_pkg::*;
#(
  parameter int unsigned N_IN = C17_N_IN
) (
  input  logic            det_sel,
  input  logic [N_IN-1:0] rnd_pattern,
  input  logic            rnd_valid,
  input  logic [N_IN-1:0] det_pattern,
  input  logic            det_valid,
  input  logic            next,
  output logic            rnd_next,
  output logic            det_next,
  output logic [N_IN-1:0] pattern,
  output logic            valid
);
  always_comb begin
    pattern  = det_sel ? det_pattern : rnd_pattern;
    valid    = det_sel ? det_valid   : rnd_valid;
    rnd_next = next & ~det_sel;
    det_next = next &  det_sel;
  end
endmodule

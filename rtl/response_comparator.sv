// Response comparator. While a pattern is applied (valid), compares the
// response of the fault-injected module under test with the fault-free
// response stored for that pattern. Any differing bit means the injected
// fault is detected. diff shows which outputs differ. Combinational.
module response_comparator
  import bist_pkg::*;
#(
  parameter int unsigned N_OUT = C17_N_OUT
) (
  input  logic             valid,
  input  logic [N_OUT-1:0] response,
  input  logic [N_OUT-1:0] expected,
  output logic [N_OUT-1:0] diff,
  output logic             mismatch
);
  assign diff     = valid ? (response ^ expected) : '0;
  assign mismatch = |diff;
endmodule

// Fault-injection multiplexer for one mutually exclusive line.
// The line is cut in two: the driving part enters wire_in and mux_out drives
// the loads. Under the two select bits the line either carries its own value
// or is forced to a constant, which models a single stuck-at fault without
// changing the rest of the circuit:
//   sel_a sel_b : mux_out
//     0     0   : wire_in   (fault-free)
//     0     1   : 0         (stuck-at-0)
//     1     0   : 1         (stuck-at-1)
//     1     1   : wire_in   (fault-free)
// This is exactly the injection-mux truth table; the sum-of-products below is
// read off that table. Purely combinational, no timing of its own.
module fault_inject_mux (
  input  logic sel_a,
  input  logic sel_b,
  input  logic wire_in,
  output logic mux_out
);
  // Force-1 term when only sel_a is set; pass term when the selects agree.
  assign mux_out = (sel_a & ~sel_b) | (wire_in & ~(sel_a ^ sel_b));
endmodule

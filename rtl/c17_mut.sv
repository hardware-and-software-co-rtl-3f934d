// ISCAS-85 benchmark C17 as the module under test, prepared for hardware
// fault injection. C17 has five inputs (N1 N2 N3 N6 N7), two outputs (N22,
// N23) and six two-input NAND gates joined by four internal wires (N10, N11,
// N16, N19). Each of its 11 mutually exclusive lines - inputs, outputs and
// internal wires - passes through a fault_inject_mux, so a stuck-at fault on
// a fanout stem reaches all of its branches. The gate netlist is the standard
// C17 one; the line numbering (sel index) is this design's own and is listed
// in bist_pkg::c17_line_e. Purely combinational.
// pi bit i = i-th input in the order N1 N2 N3 N6 N7; po bit 0 = N22, bit 1 = N23.
module c17_mut
  import bist_pkg::*;
(
  input  logic [C17_N_IN-1:0]  pi,
  input  logic [1:0]           sel [C17_N_LINES],
  output logic [C17_N_OUT-1:0] po
);
  // Line positions as plain integers.
  localparam int I1  = int'(L_N1),  I2  = int'(L_N2),  I3  = int'(L_N3);
  localparam int I6  = int'(L_N6),  I7  = int'(L_N7),  I10 = int'(L_N10);
  localparam int I11 = int'(L_N11), I16 = int'(L_N16), I19 = int'(L_N19);
  localparam int I22 = int'(L_N22), I23 = int'(L_N23);

  logic [C17_N_LINES-1:0] raw;   // driving side of every line
  logic [C17_N_LINES-1:0] ln;    // load side of every line (after the mux)

  for (genvar i = 0; i < C17_N_LINES; i++) begin : g_inj
    fault_inject_mux u_mux (
      .sel_a  (sel[i][1]),
      .sel_b  (sel[i][0]),
      .wire_in(raw[i]),
      .mux_out(ln[i])
    );
  end

  always_comb begin
    raw[I1]  = pi[0];
    raw[I2]  = pi[1];
    raw[I3]  = pi[2];
    raw[I6]  = pi[3];
    raw[I7]  = pi[4];
    raw[I10] = ~(ln[I1]  & ln[I3]);
    raw[I11] = ~(ln[I3]  & ln[I6]);
    raw[I16] = ~(ln[I2]  & ln[I11]);
    raw[I19] = ~(ln[I11] & ln[I7]);
    raw[I22] = ~(ln[I10] & ln[I16]);
    raw[I23] = ~(ln[I16] & ln[I19]);
  end

  assign po = {ln[I23], ln[I22]};
endmodule

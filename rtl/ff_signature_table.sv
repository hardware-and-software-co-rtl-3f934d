// Fault-free signature table. Holds the fault-free response of the module
// under test for every test pattern index of the current run. It is written
// during the fault-free pass (no fault injected) and read, by the same
// pattern index, while faults are injected, so the comparator always sees
// the correct response to the pattern now applied. Written as an array so it
// maps to a small RAM; synchronous write, combinational read.
module ff_signature_table
  import bist_pkg::*;
#(
  parameter int unsigned N_OUT = C17_N_OUT,
  parameter int unsigned DEPTH = MAX_PAT
) (
  input  logic             clk,
  input  logic             we,
  input  logic [PAT_W-1:0] waddr,
  input  logic [N_OUT-1:0] wdata,
  input  logic [PAT_W-1:0] raddr,
  output logic [N_OUT-1:0] rdata
);
  logic [N_OUT-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (waddr < PAT_W'(DEPTH))) mem[waddr] <= wdata;
  end

  assign rdata = (raddr < PAT_W'(DEPTH)) ? mem[raddr] : '0;
endmodule

// Deterministic test pattern generator (DTPG).
// Plays a stored compact test set, one vector per request, from a small
// read-only table. The default table is a five-vector set for C17 (five is
// the published size of the C17 deterministic set) that detects all 22
// single stuck-at faults, every vector detecting at least one fault not
// caught by the vectors before it; the vectors themselves were chosen for
// this design. Vector bits are {N7,N6,N3,N2,N1}.
//
// Interface: restart returns to the first vector. valid is high while a
// vector is available; next consumes it and the following vector is valid on
// the next clock. valid drops after the last vector.
module dtpg
  import bist_pkg::*;
#(
  parameter int unsigned N_IN  = C17_N_IN,
  parameter int unsigned N_VEC = 5,
  parameter logic [N_IN-1:0] VECTORS [N_VEC] = '{
    5'b00000, 5'b10000, 5'b10100, 5'b01010, 5'b11101
  }
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            restart,
  input  logic            next,
  output logic [N_IN-1:0] pattern,
  output logic            valid
);
  localparam int unsigned IDX_W = $clog2(N_VEC + 1);

  logic [IDX_W-1:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                idx <= '0;
    else if (restart)          idx <= '0;
    else if (next && valid)    idx <= idx + 1'b1;
  end

  assign valid   = (idx < IDX_W'(N_VEC));
  assign pattern = valid ? VECTORS[idx] : '0;
endmodule

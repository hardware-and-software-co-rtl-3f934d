// Result memory. Stores, for every detected fault, a record of the faulty
// line, its stuck value, the index of the first pattern that detected it,
// that pattern and the faulty response (bist_pkg::fault_rec_t). Records are
// appended in detection order; count says how many are held. clear empties
// it at the start of a run; writes beyond DEPTH are dropped. Synchronous
// write, combinational read.
module result_memory
  import bist_pkg::*;
#(
  parameter int unsigned DEPTH = 2 * C17_N_LINES
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       we,
  input  fault_rec_t                 wdata,
  input  logic [$clog2(DEPTH+1)-1:0] rd_addr,
  output fault_rec_t                 rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH + 1);

  fault_rec_t mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       count <= '0;
    else if (clear)   count <= '0;
    else if (we && (count < AW'(DEPTH))) count <= count + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!clear && we && (count < AW'(DEPTH))) mem[count] <= wdata;
  end

  assign rd_data = (rd_addr < count) ? mem[rd_addr] : '0;
endmodule

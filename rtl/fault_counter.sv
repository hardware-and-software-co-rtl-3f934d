// Detected-fault counter group. Keeps one counter per test pattern index,
// holding how many faults that pattern was the first to detect, and a total
// of all detected faults. clear zeroes everything at the start of a run;
// inc with idx adds one detection. Counters saturate at their maximum.
// One read port (rd_idx -> rd_count) for reporting. Counter width is this
// design's choice.
module fault_counter
  import bist_pkg::*;
#(
  parameter int unsigned DEPTH = MAX_PAT,
  parameter int unsigned CW    = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             inc,
  input  logic [PAT_W-1:0] idx,
  input  logic [PAT_W-1:0] rd_idx,
  output logic [CW-1:0]    rd_count,
  output logic [CW-1:0]    total
);
  logic [CW-1:0] cnt [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) cnt[i] <= '0;
      total <= '0;
    end else if (clear) begin
      for (int i = 0; i < DEPTH; i++) cnt[i] <= '0;
      total <= '0;
    end else if (inc) begin
      if ((idx < PAT_W'(DEPTH)) && (cnt[idx] != '1)) cnt[idx] <= cnt[idx] + 1'b1;
      if (total != '1) total <= total + 1'b1;
    end
  end

  assign rd_count = (rd_idx < PAT_W'(DEPTH)) ? cnt[rd_idx] : '0;
endmodule

// BIST fault-grading engine for the ISCAS-85 C17 core.
// A pseudorandom and a deterministic test pattern generator feed, through a
// select multiplexer, the C17 module under test whose every mutually
// exclusive line carries a fault-injection multiplexer. A fault-free pass
// fills the fault-free signature table; then each single stuck-at fault is
// injected in turn and patterns are applied until the comparator sees a
// response that differs from the fault-free one. Each detection bumps the
// counter of the detecting pattern and is logged in the result memory with
// that pattern. At the end detected_total / fault_total is the fault
// coverage and the per-pattern counters give the detection profile.
//
// No space compactor sits between the MUT and the comparator: the MUT
// response (N22, N23) goes to the comparator directly and is also brought
// out on mut_response, where a compactor would attach.
//
// Interface: pulse start (with det_mode chosen) while idle or done; busy is
// high during the run and done afterwards until the next start; stop aborts.
// The pattern count of a random run is N_PAT_RANDOM (2 x 11 lines = 22 for
// C17), of a deterministic run the size of the stored set (5).
// Timing, random source: (1 + N_PAT) generator steps of 5 clocks plus one
// consume clock per pattern, one restart clock per fault.
module bist_verifier_top
  import bist_pkg::*;
#(
  parameter logic [30:0] SEED         = DEFAULT_SEED,
  parameter int unsigned N_PAT_RANDOM = C17_N_PAT,
  parameter int unsigned N_DET        = 5
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     stop,
  input  logic                     det_mode,
  output logic                     busy,
  output logic                     done,
  output logic [7:0]               detected_total,
  output logic [7:0]               fault_total,
  output logic [PAT_W-1:0]         patterns_used,
  input  logic [PAT_W-1:0]         cnt_rd_addr,
  output logic [7:0]               cnt_rd_data,
  input  logic [4:0]               log_rd_addr,
  output fault_rec_t               log_rd_data,
  output logic [4:0]               log_count,
  output logic [C17_N_OUT-1:0]     mut_response
);
  // Generator side
  logic                rnd_valid, det_valid, pat_valid;
  logic [C17_N_IN-1:0] rnd_pattern, det_pattern, pattern;
  logic                rnd_next, det_next;
  // Control
  logic                det_sel, tpg_restart, tpg_next, sig_we, inj_en;
  logic                clear, det, undet;
  logic [PAT_W-1:0]    pat_idx;
  logic [LINE_W-1:0]   line;
  stuck_e              stuck;
  // Datapath
  logic [1:0]          sel [C17_N_LINES];
  logic [C17_N_OUT-1:0] response, expected, diff;
  logic                mismatch;
  logic [7:0]          faults_done;

  ptpg #(.N_IN(C17_N_IN), .SEED(SEED)) u_ptpg (
    .clk, .rst_n, .restart(tpg_restart), .next(rnd_next),
    .pattern(rnd_pattern), .valid(rnd_valid)
  );

  dtpg #(.N_IN(C17_N_IN), .N_VEC(N_DET)) u_dtpg (
    .clk, .rst_n, .restart(tpg_restart), .next(det_next),
    .pattern(det_pattern), .valid(det_valid)
  );

  tpg_mux #(.N_IN(C17_N_IN)) u_tpg_mux (
    .det_sel, .rnd_pattern, .rnd_valid, .det_pattern, .det_valid,
    .next(tpg_next), .rnd_next, .det_next, .pattern, .valid(pat_valid)
  );

  fault_injector #(.N_LINES(C17_N_LINES)) u_inj (
    .en(inj_en), .line, .stuck, .sel
  );

  c17_mut u_mut (.pi(pattern), .sel, .po(response));

  ff_signature_table #(.N_OUT(C17_N_OUT), .DEPTH(MAX_PAT)) u_sig (
    .clk, .we(sig_we), .waddr(pat_idx), .wdata(response),
    .raddr(pat_idx), .rdata(expected)
  );

  response_comparator #(.N_OUT(C17_N_OUT)) u_cmp (
    .valid(pat_valid & inj_en), .response, .expected, .diff, .mismatch
  );

  fault_counter #(.DEPTH(MAX_PAT), .CW(8)) u_cnt (
    .clk, .rst_n, .clear, .inc(det), .idx(pat_idx),
    .rd_idx(cnt_rd_addr), .rd_count(cnt_rd_data), .total(detected_total)
  );

  result_memory #(.DEPTH(2 * C17_N_LINES)) u_mem (
    .clk, .rst_n, .clear, .we(det),
    .wdata('{line: line, stuck: stuck, pat_idx: pat_idx,
             pattern: pattern, response: response}),
    .rd_addr(log_rd_addr), .rd_data(log_rd_data), .count(log_count)
  );

  bist_controller #(.N_LINES(C17_N_LINES)) u_ctrl (
    .clk, .rst_n, .start, .stop, .det_mode,
    .n_pat_rnd(PAT_W'(N_PAT_RANDOM)), .n_pat_det(PAT_W'(N_DET)),
    .pat_valid, .mismatch, .det_sel, .tpg_restart, .tpg_next, .pat_idx,
    .sig_we, .inj_en, .line, .stuck, .clear, .det, .undet, .busy, .done
  );

  // Number of faults graded so far (detected or escaped).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             faults_done <= '0;
    else if (clear)         faults_done <= '0;
    else if (det || undet)  faults_done <= faults_done + 1'b1;
  end

  assign fault_total   = faults_done;
  assign patterns_used = det_sel ? PAT_W'(N_DET) : PAT_W'(N_PAT_RANDOM);
  assign mut_response  = response;
endmodule

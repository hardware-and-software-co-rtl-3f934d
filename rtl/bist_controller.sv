// Fault-grading sequencer of the BIST engine.
// A run starts with a fault-free pass: the chosen generator is restarted and
// each of the n_pat patterns is applied with no fault injected, its response
// being written into the fault-free signature table. Then every mutually
// exclusive line is taken in turn, stuck-at-0 first and stuck-at-1 second.
// For each such fault the generator is restarted and patterns are applied
// one by one: if the response differs from the fault-free one the fault is
// detected (det strobe, recorded with the current pattern index) and the
// engine moves to the next fault at once; otherwise the next pattern is
// applied, and a fault still undetected after the last pattern is counted
// as undetected (undet strobe). stop aborts a run at any time.
//
// Timing: one pattern per clock in which pat_valid is high; restart costs
// one clock per fault. The generator's pattern is combinational through the
// module under test and the comparator, so mismatch refers to the current
// pat_idx. det_sel is the test-source select, sampled at start.
module bist_controller
  import bist_pkg::*;
#(
  parameter int unsigned N_LINES = C17_N_LINES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              stop,
  input  logic              det_mode,    // 1: deterministic source
  input  logic [PAT_W-1:0]  n_pat_rnd,   // patterns per run, random source
  input  logic [PAT_W-1:0]  n_pat_det,   // patterns per run, deterministic
  input  logic              pat_valid,
  input  logic              mismatch,
  output logic              det_sel,
  output logic              tpg_restart,
  output logic              tpg_next,
  output logic [PAT_W-1:0]  pat_idx,
  output logic              sig_we,      // write fault-free table
  output logic              inj_en,
  output logic [LINE_W-1:0] line,
  output stuck_e            stuck,
  output logic              clear,       // clear counters and memory
  output logic              det,         // fault detected at pat_idx
  output logic              undet,       // fault escaped all patterns
  output logic              busy,
  output logic              done
);
  typedef enum logic [2:0] {
    S_IDLE, S_GOLD, S_RESTART, S_FAULT, S_DONE
  } state_e;

  state_e           state, state_nxt;
  logic [PAT_W-1:0] n_pat;
  logic [PAT_W-1:0] idx_nxt;
  logic [LINE_W-1:0] line_nxt;
  stuck_e           stuck_nxt;
  logic             sel_q;
  logic [PAT_W-1:0] idx_q;
  logic             last_pat;
  logic             last_fault;

  assign det_sel = sel_q;
  assign n_pat   = sel_q ? n_pat_det : n_pat_rnd;
  assign pat_idx = idx_q;

  assign last_pat   = (idx_q == n_pat - 1'b1);
  assign last_fault = (line == LINE_W'(N_LINES - 1)) && (stuck == SA1);

  always_comb begin
    state_nxt   = state;
    idx_nxt     = idx_q;
    line_nxt    = line;
    stuck_nxt   = stuck;
    tpg_restart = 1'b0;
    tpg_next    = 1'b0;
    sig_we      = 1'b0;
    inj_en      = 1'b0;
    clear       = 1'b0;
    det         = 1'b0;
    undet       = 1'b0;
    unique case (state)
      S_IDLE, S_DONE: begin
        if (start) begin
          clear       = 1'b1;
          tpg_restart = 1'b1;
          idx_nxt     = '0;
          state_nxt   = S_GOLD;
        end
      end
      S_GOLD: begin
        if (pat_valid) begin
          sig_we   = 1'b1;
          tpg_next = 1'b1;
          if (last_pat) begin
            line_nxt  = '0;
            stuck_nxt = SA0;
            state_nxt = S_RESTART;
          end else begin
            idx_nxt = idx_q + 1'b1;
          end
        end
      end
      S_RESTART: begin
        tpg_restart = 1'b1;
        idx_nxt     = '0;
        state_nxt   = S_FAULT;
      end
      S_FAULT: begin
        inj_en = 1'b1;
        if (pat_valid) begin
          tpg_next = 1'b1;
          if (mismatch || last_pat) begin
            det   = mismatch;
            undet = ~mismatch;
            if (last_fault) begin
              state_nxt = S_DONE;
            end else begin
              state_nxt = S_RESTART;
              if (stuck == SA0) begin
                stuck_nxt = SA1;
              end else begin
                stuck_nxt = SA0;
                line_nxt  = line + 1'b1;
              end
            end
          end else begin
            idx_nxt = idx_q + 1'b1;
          end
        end
      end
      default: state_nxt = S_IDLE;
    endcase
    if (stop) state_nxt = S_IDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx_q <= '0;
      line  <= '0;
      stuck <= SA0;
      sel_q <= 1'b0;
    end else begin
      state <= state_nxt;
      idx_q <= idx_nxt;
      line  <= line_nxt;
      stuck <= stuck_nxt;
      if ((state == S_IDLE || state == S_DONE) && start) sel_q <= det_mode;
    end
  end

  assign busy = (state != S_IDLE) && (state != S_DONE);
  assign done = (state == S_DONE);

  // A fault is either detected or escapes, never both.
  a_det_undet: assert property (@(posedge clk) disable iff (!rst_n) !(det && undet));
  // The fault-free table is only written when no fault is injected.
  a_gold_clean: assert property (@(posedge clk) disable iff (!rst_n) !(sig_we && inj_en));
endmodule

// Shared types and constants of the built-in self-test (BIST) fault-grading
// engine. The engine drives a module under test (MUT) with test patterns,
// injects one single stuck-at fault at a time on one of its mutually
// exclusive lines, and compares the responses with the fault-free ones.
//
// The two-bit select code of a fault-injection multiplexer follows the truth
// table of the injection mux: {SelA,SelB} = 00 or 11 passes the wire, 01
// forces 0 and 10 forces 1. The detected-fault record layout and the counter
// widths are this design's own choices.
package bist_pkg;

  // Upper bound on the number of test patterns in one run
  // (pattern count = 2 * (inputs + outputs + wires), capped at 199).
  localparam int unsigned MAX_PAT = 199;
  localparam int unsigned PAT_W   = 8;    // holds 0..MAX_PAT
  localparam int unsigned LINE_W  = 5;    // up to 32 injectable lines

  // C17 benchmark sizes.
  localparam int unsigned C17_N_IN    = 5;
  localparam int unsigned C17_N_OUT   = 2;
  localparam int unsigned C17_N_WIRE  = 4;
  localparam int unsigned C17_N_LINES = C17_N_IN + C17_N_OUT + C17_N_WIRE;  // 11
  localparam int unsigned C17_N_PAT   =
      (2 * C17_N_LINES > MAX_PAT) ? MAX_PAT : 2 * C17_N_LINES;             // 22

  // Seed of the multiplicative congruential pattern generator.
  localparam logic [30:0] DEFAULT_SEED = 31'd1050420308;

  // Select code of one fault-injection mux, bit 1 = SelA, bit 0 = SelB.
  typedef enum logic [1:0] {
    SEL_PASS   = 2'b00,
    SEL_FORCE0 = 2'b01,
    SEL_FORCE1 = 2'b10,
    SEL_PASS2  = 2'b11
  } inj_sel_e;

  // Fault polarity; stuck-at-0 is injected first on every line.
  typedef enum logic {
    SA0 = 1'b0,
    SA1 = 1'b1
  } stuck_e;

  // Mutually exclusive lines of C17: primary inputs, primary outputs,
  // then internal wires.
  typedef enum logic [LINE_W-1:0] {
    L_N1 = 5'd0, L_N2 = 5'd1, L_N3 = 5'd2, L_N6 = 5'd3, L_N7 = 5'd4,
    L_N22 = 5'd5, L_N23 = 5'd6,
    L_N10 = 5'd7, L_N11 = 5'd8, L_N16 = 5'd9, L_N19 = 5'd10
  } c17_line_e;

  // One entry of the detected-fault memory.
  typedef struct packed {
    logic [LINE_W-1:0]    line;      // faulty line index
    stuck_e               stuck;     // stuck value
    logic [PAT_W-1:0]     pat_idx;   // index of the first detecting pattern
    logic [C17_N_IN-1:0]  pattern;   // that pattern, bit i = i-th input
    logic [C17_N_OUT-1:0] response;  // faulty response, bit j = j-th output
  } fault_rec_t;

endpackage

// Pseudorandom test pattern generator (PTPG).
// A multiplicative congruential generator, ran <- (ran * 16807) mod (2^31-1),
// produces one pseudorandom number per clock; its least significant bit
// (ran mod 2) becomes one bit of the test pattern, the first number giving
// the first input. The product is first truncated to 32 bits, as a 32-bit
// unsigned long does in the reference program; with that wrap the generator
// reproduces the published C17 pattern sequence bit for bit for the default
// seed. The mod (2^31-1) needs no divider: x = hi*2^31 + lo gives
// x mod (2^31-1) = lo + hi, minus 2^31-1 once if that is not below it.
//
// Interface: restart reloads the seed and discards any pattern. After that
// the generator takes N_IN clocks to build a pattern, then holds it with
// valid high until next is asserted (pattern consumed), and builds the next
// one. Pattern bit i = i-th input. The bit-serial build and the
// valid/next handshake are this design's choices.
module ptpg
  import bist_pkg::*;
#(
  parameter int unsigned N_IN = C17_N_IN,
  parameter logic [30:0] SEED = DEFAULT_SEED
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            restart,
  input  logic            next,
  output logic [N_IN-1:0] pattern,
  output logic            valid
);
  localparam logic [31:0] MULT = 32'd16807;
  localparam logic [31:0] MOD  = 32'h7FFF_FFFF;
  localparam int unsigned CNT_W = (N_IN > 1) ? $clog2(N_IN) : 1;

  logic [30:0]      ran;
  logic [30:0]      ran_nxt;
  logic [CNT_W-1:0] cnt;

  // One generator step.
  always_comb begin
    logic [31:0] prod;
    logic [31:0] sum;
    prod = 32'({1'b0, ran} * MULT);          // wraps at 2^32
    sum  = {1'b0, prod[30:0]} + {31'd0, prod[31]};
    if (sum >= MOD) sum = sum - MOD;
    ran_nxt = sum[30:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ran     <= SEED;
      cnt     <= '0;
      valid   <= 1'b0;
      pattern <= '0;
    end else if (restart) begin
      ran     <= SEED;
      cnt     <= '0;
      valid   <= 1'b0;
    end else if (valid) begin
      if (next) valid <= 1'b0;
    end else begin
      ran          <= ran_nxt;
      pattern[cnt] <= ran_nxt[0];
      if (cnt == CNT_W'(N_IN - 1)) begin
        cnt   <= '0;
        valid <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule

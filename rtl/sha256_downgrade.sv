// sha256_downgrade: round-based SHA-256 compression core with a downgrade Trojan in its round
// counter.
//
// The core follows the loop structure of a C implementation of sha256_transform: a setup phase
// fills the 64-word message schedule m[], then one cycle per round updates the working
// variables a..h with t1 = h + EP1(e) + CH(e,f,g) + k[i] + m[i] and t2 = EP0(a) + MA(a,b,c), and
// a last cycle adds a..h to the incoming chaining value. The round counter i, its +1
// incrementer and the comparator i < ROUNDS that tells the controller whether to run another
// round are explicit, as an HLS tool builds them. The Trojan is one multiplexer on the counter's
// initial value: at the start of the rounds i is loaded with 0 normally, but with
// COUNTER = ROUNDS - REDUCED_ROUNDS when `trojan` is high, so only REDUCED_ROUNDS rounds (the
// last ones, i = COUNTER .. ROUNDS-1) are executed and the digest is that of a weakened hash.
// Every other line of the core is exercised in every run.
// The round loop, the counter with its preload multiplexer and comparator, ROUNDS = 64 and the
// preload value follow the design description, which takes 18 rounds as the insecure target.
// The setup and final-update phases (omitted in the description) follow FIPS 180-4; computing
// the schedule one word per cycle and the block-level interface are this implementation's
// choices.
//
// Interface: state_in[0..7] is the chaining value (H0..H7; the standard initial value for the
// first block), block[0..15] the sixteen big-endian message words m[0..15]. Pulse start for one
// cycle (state_in and block are captured then); trojan is sampled in the cycle that ends the setup phase. done pulses for one cycle
// with state_out valid (held until the next start).
// Timing: 1 (load) + 48 (schedule) + (ROUNDS - i0) rounds + 1 (failing test) + 1 (update)
// cycles from the start edge to the done cycle, i0 being the preloaded counter value: 115 for a
// normal run, 69 for a downgraded run at the defaults. Reset is active-low, synchronous.
module sha256_downgrade
  import bhls_pkg::*;
#(
  parameter int unsigned ROUNDS         = 64,
  parameter int unsigned REDUCED_ROUNDS = 18
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [7:0][31:0] state_in,
  input  logic [15:0][31:0] block,
  input  logic             trojan,
  output logic             busy,
  output logic             done,
  output logic [7:0][31:0] state_out,
  output logic             downgraded  // the last run started its rounds from COUNTER
);

  localparam int unsigned COUNTER = ROUNDS - REDUCED_ROUNDS;
  localparam int unsigned IW      = $clog2(ROUNDS + 1);

  typedef enum logic [2:0] {IDLE, SCHED, ROUND, UPDATE, FIN} state_t;
  state_t state;

  logic [31:0]   m [ROUNDS];
  logic [7:0][31:0] hin;            // chaining value captured at start
  logic [IW-1:0] i;
  logic [IW-1:0] j;                 // schedule index 16..ROUNDS-1
  logic [31:0]   a, b, c, d, e, f, g, h;
  logic [31:0]   t1, t2, w_new;
  logic          test;

  assign test  = (i < IW'(ROUNDS));
  assign t1    = h + sha_ep1(e) + sha_ch(e, f, g) + SHA256_K[i[5:0]] + m[i[5:0]];
  assign t2    = sha_ep0(a) + sha_ma(a, b, c);
  assign w_new = sha_sig1(m[j - 2]) + m[j - 7] + sha_sig0(m[j - 15]) + m[j - 16];

  assign busy = (state != IDLE) && (state != FIN);
  assign done = (state == FIN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= IDLE;
      i          <= '0;
      j          <= '0;
      downgraded <= 1'b0;
      {a, b, c, d, e, f, g, h} <= '0;
      state_out  <= '0;
      hin        <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          for (int k = 0; k < 16; k++) m[k] <= block[k];
          hin   <= state_in;
          {a, b, c, d, e, f, g, h} <= {state_in[0], state_in[1], state_in[2], state_in[3],
                                       state_in[4], state_in[5], state_in[6], state_in[7]};
          j     <= IW'(16);
          state <= SCHED;
        end
        SCHED: begin
          m[j[5:0]] <= w_new;
          j         <= j + 1'b1;
          if (j == IW'(ROUNDS - 1)) begin
            // round-counter preload: the Trojan's multiplexer
            i          <= trojan ? IW'(COUNTER) : '0;
            downgraded <= trojan;
            state      <= ROUND;
          end
        end
        ROUND: begin
          if (test) begin
            h <= g; g <= f; f <= e; e <= d + t1;
            d <= c; c <= b; b <= a; a <= t1 + t2;
            i <= i + 1'b1;
          end else begin
            state <= UPDATE;
          end
        end
        UPDATE: begin
          state_out[0] <= hin[0] + a;
          state_out[1] <= hin[1] + b;
          state_out[2] <= hin[2] + c;
          state_out[3] <= hin[3] + d;
          state_out[4] <= hin[4] + e;
          state_out[5] <= hin[5] + f;
          state_out[6] <= hin[6] + g;
          state_out[7] <= hin[7] + h;
          state        <= FIN;
        end
        FIN:     state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // done is a single-cycle pulse; the round counter never passes ROUNDS
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
  a_i_range:    assert property (@(posedge clk) disable iff (!rst_n) state == ROUND |-> i <= IW'(ROUNDS));

  initial begin
    assert (ROUNDS == 64) else $error("SHA-256 has 64 round constants; ROUNDS must be 64");
    assert (REDUCED_ROUNDS <= ROUNDS) else $error("REDUCED_ROUNDS must not exceed ROUNDS");
  end

endmodule

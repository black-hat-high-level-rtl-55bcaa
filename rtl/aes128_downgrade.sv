// aes128_downgrade: round-based AES-128 encryption core with the same round-counter downgrade
// Trojan as the SHA-256 core.
//
// A setup phase expands the key into the eleven round keys, one per cycle. The rounds then run
// one per cycle, driven by a round counter i, its +1 incrementer and the comparator
// i < ROUNDS: after the initial AddRoundKey with round key 0, the round that moves i to i+1
// applies SubBytes, ShiftRows, MixColumns (left out in the last round) and AddRoundKey with round
// key i+1. The Trojan is a multiplexer on the counter's initial value: i starts at 0 normally
// and at COUNTER = ROUNDS - REDUCED_ROUNDS when `trojan` is high, so only REDUCED_ROUNDS rounds
// run, with round keys COUNTER+1 .. ROUNDS, and the ciphertext is that of a cipher weak enough
// for key recovery. The design description names AES-128 as the second downgraded core
// (10 rounds reduced to 7) and gives the counter preload; everything else, the round datapath,
// the key schedule and the S-box (generated at elaboration from its GF(2^8) definition) follows
// FIPS-197, and the block interface and one-round-per-cycle structure are this implementation's
// choices.
//
// Interface: key and pt are 128-bit blocks with byte 0 in bits 127:120 (FIPS-197 order).
// Pulse start for one cycle (key and pt are captured then); trojan is sampled in the cycle that
// ends the key expansion. done pulses for one cycle with ct valid (held until the next start).
// Timing: 1 (load and initial AddRoundKey) + 10 (key expansion) + (ROUNDS - i0) rounds
// + 1 (failing test) cycles from the start edge to the done cycle: 22 for a normal run and 19
// for a downgraded run at the defaults. Reset is active-low, synchronous.
module aes128_downgrade
  import bhls_pkg::*;
#(
  parameter int unsigned ROUNDS         = 10,
  parameter int unsigned REDUCED_ROUNDS = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] pt,
  input  logic         trojan,
  output logic         busy,
  output logic         done,
  output logic [127:0] ct,
  output logic         downgraded  // the last run started its rounds from COUNTER
);

  localparam int unsigned COUNTER = ROUNDS - REDUCED_ROUNDS;
  localparam int unsigned IW      = $clog2(ROUNDS + 1);
  localparam sbox_t SBOX = gen_sbox();

  typedef enum logic [1:0] {IDLE, KEXP, ROUND, FIN} state_t;
  state_t state;

  logic [127:0]  rk [ROUNDS + 1];
  logic [127:0]  st;
  logic [IW-1:0] i, k;
  logic [7:0]    rcon;
  logic [127:0]  rk_next, st_next;
  logic          test;

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {SBOX[w[31:24]], SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]]};
  endfunction

  function automatic logic [127:0] sub_bytes(input logic [127:0] s);
    logic [127:0] o;
    for (int n = 0; n < 16; n++) o[8*n +: 8] = SBOX[s[8*n +: 8]];
    return o;
  endfunction

  // next round key from the previous one (words w0..w3, w0 in bits 127:96)
  always_comb begin
    logic [31:0] w0, w1, w2, w3, tw;
    {w0, w1, w2, w3} = rk[k - 1'b1];
    tw = sub_word({w3[23:0], w3[31:24]}) ^ {rcon, 24'h0};
    w0 = w0 ^ tw;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    rk_next = {w0, w1, w2, w3};
  end

  // one cipher round, entering round i+1
  always_comb begin
    logic [127:0] sr;
    sr = aes_shift_rows(sub_bytes(st));
    if (i == IW'(ROUNDS - 1)) st_next = sr ^ rk[i + 1'b1];
    else                      st_next = aes_mix_columns(sr) ^ rk[i + 1'b1];
  end

  assign test = (i < IW'(ROUNDS));
  assign busy = (state != IDLE) && (state != FIN);
  assign done = (state == FIN);
  assign ct   = st;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= IDLE;
      st         <= '0;
      i          <= '0;
      k          <= '0;
      rcon       <= 8'h01;
      downgraded <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          rk[0] <= key;
          st    <= pt ^ key;            // initial AddRoundKey
          k     <= IW'(1);
          rcon  <= 8'h01;
          state <= KEXP;
        end
        KEXP: begin
          rk[k] <= rk_next;
          k     <= k + 1'b1;
          rcon  <= xtime(rcon);
          if (k == IW'(ROUNDS)) begin
            // round-counter preload: the Trojan's multiplexer
            i          <= trojan ? IW'(COUNTER) : '0;
            downgraded <= trojan;
            state      <= ROUND;
          end
        end
        ROUND: begin
          if (test) begin
            st <= st_next;
            i  <= i + 1'b1;
          end else begin
            state <= FIN;
          end
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
    assert (ROUNDS == 10) else $error("AES-128 has 10 round keys after the first; ROUNDS must be 10");
    assert (REDUCED_ROUNDS >= 1 && REDUCED_ROUNDS <= ROUNDS) else $error("REDUCED_ROUNDS out of range");
  end

endmodule

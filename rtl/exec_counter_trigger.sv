// exec_counter_trigger: time-bomb trigger that arms a Trojan after a fixed number of
// executions of the IP core it sits in.
//
// A WIDTH-bit counter advances on every exec_done pulse (one pulse per completed run of the
// core). When it wraps from all ones back to zero, 2**WIDTH executions have completed and the
// sticky `trigger` output rises; it then stays high until reset. With the default WIDTH of 16
// the Trojan activates after 65,536 executions, and a longer delay only costs a few more
// counter bits, as in the design description. Using the carry out of the counter as the arming
// event and keeping the trigger sticky until reset are this implementation's choices.
//
// Timing: trigger rises in the cycle after the clock edge that samples the 2**WIDTH-th
// exec_done pulse; exec_done pulses after that are ignored. Reset is active-low, synchronous.
module exec_counter_trigger #(
  parameter int unsigned WIDTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic exec_done,   // one-cycle pulse per completed execution of the IP core
  output logic trigger,     // Trojan activation, sticky
  output logic [WIDTH-1:0] count  // executions seen so far (modulo 2**WIDTH)
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count   <= '0;
      trigger <= 1'b0;
    end else if (exec_done && !trigger) begin
      count <= count + 1'b1;
      if (&count) trigger <= 1'b1;
    end
  end

  // once armed, the trigger stays armed until reset
  a_sticky: assert property (@(posedge clk) disable iff (!rst_n) trigger |=> trigger);

endmodule

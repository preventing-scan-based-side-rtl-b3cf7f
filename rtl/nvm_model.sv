// nvm_model: behavioural model of the on-chip nonvolatile memory that holds
// the NSR configuration word.
//
// This is a behavioural model of a process-specific memory macro, not logic
// to be synthesized as is. The memory holds N_BITS configuration bits, one
// per NSR cell, that the IP owner programs once per chip; the bits choose Q
// or Qbar between neighbouring NSR cells and so make the test authorization
// code differ from chip to chip. Only the read-out of the word and its
// per-chip programmability come from the original design. The programming
// port (prog_we/prog_data, one whole word written on a rising clock edge)
// and the factory contents INIT are this model's own choices. The contents
// are nonvolatile: the system reset does not touch them.
//
// Interface: cfg is the stored word, valid at all times.
// Timing: a write with prog_we = 1 is visible on cfg after the clock edge.
module nvm_model #(
  parameter int unsigned         N_BITS = secscan_pkg::N_AUTH_DEFAULT,
  parameter logic [N_BITS-1:0]   INIT   = secscan_pkg::NVM_CFG_DEFAULT
) (
  input  logic              clk,
  input  logic              prog_we,    // owner programming strobe
  input  logic [N_BITS-1:0] prog_data,  // word to program
  output logic [N_BITS-1:0] cfg         // configuration word to the NSR muxes
);

  logic [N_BITS-1:0] cells = INIT;

  always_ff @(posedge clk)
    if (prog_we) cells <= prog_data;

  assign cfg = cells;

endmodule

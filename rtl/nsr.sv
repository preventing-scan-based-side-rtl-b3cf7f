// nsr: configurable nonlinear shift register (NSR) that receives and stores
// the test authorization code.
//
// The register has N cells, cell 0 next to the code input. Between cell i and
// cell i+1 a 2:1 mux, steered by configuration bit cfg[i] from the
// nonvolatile memory, passes either Q (cfg[i] = 1) or Qbar (cfg[i] = 0) of
// cell i. Cell 0 is fed by an input mux: while sel_feedback = 0 it takes the
// code input pin, otherwise the output of the mux after the last cell
// (cfg[N-1] choosing Q or Qbar of cell N-1), so the register then rotates its
// contents with inversions. All of this follows the original structure; the
// inversions make the stored pattern depend on the NVM word, so the code that
// yields a given scan key differs from chip to chip.
//
// The original gates the NSR clock (clk_1 = CLK AND SE AND Q1). Here the
// cells use the system clock with a shift enable, shift_en, which is the same
// condition. Reset (asynchronous, active high) clears every cell to 0.
//
// Interface: code bits are entered one per enabled clock, first code bit
// first. state is the register contents; state_next is the value the cells
// take at the next enabled edge (used to check the code as it is completed).
module nsr #(
  parameter int unsigned N = secscan_pkg::N_AUTH_DEFAULT
) (
  input  logic         clk,
  input  logic         rst,           // asynchronous, active high
  input  logic         shift_en,      // clk_1 of the original (as an enable)
  input  logic         sel_feedback,  // Cout: 0 = code input, 1 = rotate
  input  logic         code_in,       // test authorization code input pin
  input  logic [N-1:0] cfg,           // NVM configuration word
  output logic [N-1:0] state,
  output logic [N-1:0] state_next
);

  logic [N-1:0] mux_out;  // output of the Q/Qbar mux after each cell

  always_comb begin
    for (int i = 0; i < int'(N); i++)
      mux_out[i] = cfg[i] ? state[i] : ~state[i];
    state_next[0] = sel_feedback ? mux_out[N-1] : code_in;
    for (int i = 1; i < int'(N); i++)
      state_next[i] = mux_out[i-1];
  end

  always_ff @(posedge clk or posedge rst)
    if (rst)           state <= '0;
    else if (shift_en) state <= state_next;

endmodule

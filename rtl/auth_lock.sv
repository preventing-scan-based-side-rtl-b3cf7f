// auth_lock: scan key check (GT2), lock flip-flop DF1 and NSR clock enable
// (GT1, GT3) of the secure scan structure.
//
// tap[i] is the signal that NSR cell i drives into its NAND obfuscation gate
// (Q or Qbar of the cell, by the cell's connection style); it is 0 for every
// cell exactly when the NSR holds the scan key. GT2 is the OR of all taps:
// 0 for a correct code, 1 otherwise. On the clock edge that completes code
// entry (last = 1) DF1 captures GT2 of the value the NSR takes at that edge,
// and then holds it until reset (the original freezes DF1 by forcing its
// clock clk_0 = CLK OR Cout high once Cout rises).
//
// The NSR shifts (clk_1 active) while the code is being entered, and after
// entry only if DF1 holds 1, i.e. a wrong code was entered: the wrong key then
// keeps rotating through the NSR for as long as SE is high. With a correct
// code the NSR is frozen and every tap stays 0. The original gates the clocks;
// here shift_en and the DF1 enable play their part on the system clock.
// The original text says DF1 is cleared at reset but also needs clk_1 active
// during entry; this design therefore adds the code-entry enable en to GT1.
//
// Interface: q1 is DF1's output (1 = wrong code), shift_en drives the NSR.
// Reset is asynchronous, active high.
module auth_lock #(
  parameter int unsigned N = secscan_pkg::N_AUTH_DEFAULT
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         se,
  input  logic         en,        // EN of CT1: a code-entry cycle
  input  logic         last,      // final code-entry cycle
  input  logic [N-1:0] tap_next,  // NAND-gate taps of the NSR's next state
  output logic         q1,
  output logic         shift_en
);

  logic gt2;

  assign gt2      = |tap_next;
  assign shift_en = se & (en | q1);   // GT1

  always_ff @(posedge clk or posedge rst)
    if (rst)       q1 <= 1'b0;
    else if (last) q1 <= gt2;         // DF1, clocked by clk_0 until Cout

  // DF1 changes only on the edge that completes code entry.
  a_q1_locked: assert property (@(posedge clk) disable iff (rst) !last |=> $stable(q1));

endmodule

// obf_scan_chain: scan chain of mux-D scan flip-flops with obfuscation points.
//
// SCAN_LEN scan flip-flops (SFFs) capture the functional input di when the
// shift enable se is low and shift the chain when se is high. At N_OBF places
// the serial path is broken by an XNOR gate: the next flop receives
// XNOR(Q of the previous flop, NAND(tap[i], node[i])), where tap[i] comes from
// NSR cell i and node[i] is a combinational node of the circuit under test.
// With tap[i] = 0 the NAND gives 1 and the XNOR passes the bit unchanged; with
// tap[i] = 1 and node[i] = 1 the bit is inverted, so both scan-in stimulus and
// scan-out response are scrambled by data-dependent values. This gate
// structure follows the original. Where the points sit along the chain is
// this design's choice (evenly spread, see secscan_pkg::obf_pos); the first
// flop takes scan_in directly and scan_out is the last flop's Q. The
// functional capture path is not affected by the obfuscation gates.
//
// Reset (asynchronous, active high) clears every flop, as the original
// clears all storage at reset. Timing: one shift or capture per clock.
module obf_scan_chain #(
  parameter int unsigned SCAN_LEN = secscan_pkg::SCAN_LEN_DEFAULT,
  parameter int unsigned N_OBF    = secscan_pkg::N_AUTH_DEFAULT
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                se,        // 1 = shift, 0 = functional capture
  input  logic                scan_in,
  input  logic [SCAN_LEN-1:0] di,        // functional next state from the CUT
  input  logic [N_OBF-1:0]    tap,       // NSR taps (0 = this point is clean)
  input  logic [N_OBF-1:0]    node,      // CUT nodes feeding the NAND gates
  output logic [SCAN_LEN-1:0] q,         // flop outputs to the CUT
  output logic                scan_out
);

  // Every obfuscation point needs a gap between two flops of its own.
  if (SCAN_LEN <= N_OBF) begin : g_bad_size
    $error("obf_scan_chain: SCAN_LEN must exceed N_OBF");
  end

  logic [SCAN_LEN-1:0] si;        // serial input of each flop
  logic [SCAN_LEN-2:0] flip;      // 1 where the XNOR inverts the passing bit

  always_comb begin
    flip = '0;
    for (int unsigned i = 0; i < N_OBF; i++)
      // XNOR(a, NAND(t, n)) = a XOR (t AND n)
      flip[secscan_pkg::obf_pos(i, N_OBF, SCAN_LEN)] = tap[i] & node[i];
    si[0] = scan_in;
    for (int j = 1; j < int'(SCAN_LEN); j++)
      si[j] = q[j-1] ^ flip[j-1];
  end

  always_ff @(posedge clk or posedge rst)
    if (rst) q <= '0;
    else     q <= se ? si : di;

  assign scan_out = q[SCAN_LEN-1];

endmodule

// secure_scan_top: scan design protected by a test authorization code.
//
// A scan chain normally gives anyone at the test pins full control and
// observation of the chip's flip-flops, which lets an attacker read out
// secret-dependent state of a cipher. Here the chain is only clean after the
// right test authorization code has been entered. When SE rises, the first
// N_AUTH clocks carry the code, one bit per clock on code_in (first bit
// first), into the nonlinear shift register (NSR). The NSR's cell-to-cell
// inversions are set per chip by the NVM word, and each cell drives its NAND
// obfuscation gate through Q or Qbar (the scan key, parameter SCAN_KEY). If
// the final NSR state equals the scan key every NAND input is 0 and the scan
// chain shifts unaltered; the NSR then freezes until reset. Otherwise lock
// flip-flop DF1 is set and the wrong key keeps rotating through the NSR for
// the rest of the test, so the XNOR gates in the chain invert bits in a
// pattern that depends on both the NSR and live CUT nodes.
//
// Blocks: nvm_model (configuration word), nsr, auth_counter (CT1, GT4),
// auth_lock (GT1, GT2, GT3, DF1), obf_scan_chain (SFFs, NAND, XNOR). The
// circuit under test is outside: it receives q, returns its functional next
// state on di and the chosen internal nodes on node.
//
// Departures from the original, all explained in the blocks: clock gating is
// replaced by clock enables on one clock; DF1 samples the check on the edge
// that completes code entry; the counter holds until reset, so a new code
// needs a reset; sizes other than N_AUTH, the NVM contents, the scan key and
// the positions of the obfuscation points are this design's own.
//
// Timing: after reset with SE high, code bits go in on the first N_AUTH
// clocks; cout and q1 are valid from the edge that takes the last bit, and
// scan data shifted from then on is clean (right code) or scrambled.
// auth_fail reports q1, the state of DF1, for test and debug access.
module secure_scan_top #(
  parameter int unsigned             N_AUTH   = secscan_pkg::N_AUTH_DEFAULT,
  parameter int unsigned             SCAN_LEN = secscan_pkg::SCAN_LEN_DEFAULT,
  parameter logic [N_AUTH-1:0]       NVM_INIT = secscan_pkg::NVM_CFG_DEFAULT,
  parameter logic [N_AUTH-1:0]       SCAN_KEY = secscan_pkg::SCAN_KEY_DEFAULT
) (
  input  logic                clk,
  input  logic                rst,        // asynchronous, active high
  input  logic                se,         // scan enable / test mode
  input  logic                code_in,    // test authorization code pin
  input  logic                scan_in,
  output logic                scan_out,
  // circuit under test
  input  logic [SCAN_LEN-1:0] cut_di,     // functional next state
  input  logic [N_AUTH-1:0]   cut_node,   // internal nodes for the NAND gates
  output logic [SCAN_LEN-1:0] cut_q,      // scan flip-flop outputs
  // NVM programming (IP owner)
  input  logic                nvm_we,
  input  logic [N_AUTH-1:0]   nvm_data,
  // status
  output logic                auth_done,  // Cout of CT1
  output logic                auth_fail   // Q1 of DF1
);

  logic [N_AUTH-1:0] cfg, nsr_state, nsr_next, tap, tap_next;
  logic              en, last, cout, q1, shift_en;

  nvm_model #(.N_BITS(N_AUTH), .INIT(NVM_INIT)) u_nvm (
    .clk, .prog_we(nvm_we), .prog_data(nvm_data), .cfg
  );

  auth_counter #(.N(N_AUTH)) u_ct1 (
    .clk, .rst, .se, .en, .last, .cout
  );

  nsr #(.N(N_AUTH)) u_nsr (
    .clk, .rst, .shift_en, .sel_feedback(cout), .code_in, .cfg,
    .state(nsr_state), .state_next(nsr_next)
  );

  // Connection style: a 1 in SCAN_KEY takes Qbar of that NSR cell.
  assign tap      = nsr_state ^ SCAN_KEY;
  assign tap_next = nsr_next  ^ SCAN_KEY;

  auth_lock #(.N(N_AUTH)) u_lock (
    .clk, .rst, .se, .en, .last, .tap_next, .q1, .shift_en
  );

  obf_scan_chain #(.SCAN_LEN(SCAN_LEN), .N_OBF(N_AUTH)) u_chain (
    .clk, .rst, .se, .scan_in, .di(cut_di), .tap, .node(cut_node),
    .q(cut_q), .scan_out
  );

  assign auth_done = cout;
  assign auth_fail = q1;

  // After a right code the NSR stays frozen at the scan key until reset.
  a_key_frozen: assert property (@(posedge clk) disable iff (rst)
                                 (cout && !q1) |=> (tap == '0) && $stable(nsr_state));

endmodule

// secscan_pkg: shared sizes and default configuration of the secure scan
// structure.
//
// The secure scan structure protects a scan chain with a test authorization
// code. The code is shifted serially into a configurable nonlinear shift
// register (NSR); only a code that leaves the NSR in the scan key state lets
// the scan chain shift unaltered. The 64-bit code length is the length used
// for the area figures of the original design. The scan chain length, the
// default NVM configuration word and the default scan key (the per-cell choice
// between a Q and a Qbar connection to the obfuscation gates) are this
// design's own choices: they are chip-specific secrets with no published value.
package secscan_pkg;

  // Length of the test authorization code = number of NSR cells.
  localparam int unsigned N_AUTH_DEFAULT   = 64;
  // Number of scan flip-flops in the protected chain (assumed).
  localparam int unsigned SCAN_LEN_DEFAULT = 128;

  // Default contents of the nonvolatile memory. Bit i drives the mux after
  // NSR cell i: 1 passes Q, 0 passes Qbar to the next cell.
  localparam logic [N_AUTH_DEFAULT-1:0] NVM_CFG_DEFAULT = 64'hA5C3_96E1_5B2D_7F08;

  // Default connection style. Bit i = 0: Q of NSR cell i drives NAND gate i
  // (the cell must hold 0 for clean scan); bit i = 1: Qbar drives it (the cell
  // must hold 1). This vector is therefore the scan key.
  localparam logic [N_AUTH_DEFAULT-1:0] SCAN_KEY_DEFAULT = 64'h3C5A_F00F_9966_E11E;

  // Scan chain position of obfuscation point i: the XNOR sits between flop
  // obf_pos(i) and flop obf_pos(i)+1. Points are spread evenly along the
  // chain; positions are distinct as long as scan_len > n_obf.
  function automatic int unsigned obf_pos(int unsigned i, int unsigned n_obf,
                                          int unsigned scan_len);
    return (i * (scan_len - 1)) / n_obf;
  endfunction

endpackage

// tb_obf_scan_chain: self-checking test of the obfuscated scan chain.
//
// A reference model of the chain (flop array, obfuscation points at the
// positions (i*(L-1))/N) runs beside the DUT. Checks: (1) with all taps 0 a
// random pattern shifted in comes out unchanged after L clocks and a
// functional capture loads di; (2) with random taps and nodes every flop
// matches the reference each clock; (3) a single active point (tap = 1,
// node = 1) inverts exactly the bits that pass it, while tap = 1 with
// node = 0 leaves the data clean.
module tb_obf_scan_chain;
  localparam int L = 128, N = 64;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic se, scan_in, scan_out;
  logic [L-1:0] di, q;
  logic [N-1:0] tap, node;
  obf_scan_chain #(.SCAN_LEN(L), .N_OBF(N)) dut (.clk, .rst, .se, .scan_in, .di,
                                                 .tap, .node, .q, .scan_out);

  logic [L-1:0] ref_q, pat, got;
  int pos[N];

  function automatic logic [L-1:0] ref_step(input logic [L-1:0] cur, input logic sin,
                                            input logic [N-1:0] t, n);
    logic [L-1:0] nx;
    logic [L-1:0] fl;
    fl = '0;
    for (int i = 0; i < N; i++) fl[pos[i]] = t[i] & n[i];
    nx[0] = sin;
    for (int j = 1; j < L; j++) nx[j] = cur[j-1] ^ fl[j-1];
    return nx;
  endfunction

  task automatic chk(input logic [L-1:0] g, e, input string what);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", what, g, e); end
  endtask

  initial begin
    for (int i = 0; i < N; i++) pos[i] = (i * (L - 1)) / N;
    rst = 1; se = 0; scan_in = 0; di = '0; tap = '0; node = '0;
    #12 rst = 0;
    chk(q, '0, "reset clears chain");

    // (1) clean shift, then capture
    pat = {$urandom, $urandom, $urandom, $urandom};
    se = 1; node = '1;
    for (int k = 0; k < L; k++) begin
      scan_in = pat[L-1-k];
      @(negedge clk);
    end
    chk(q, pat, "clean shift-in");
    di = {$urandom, $urandom, $urandom, $urandom};
    se = 0; @(negedge clk);
    chk(q, di, "functional capture");
    se = 1;
    for (int k = 0; k < L; k++) begin
      got[L-1-k] = scan_out;
      scan_in = 0;
      @(negedge clk);
    end
    chk(got, di, "clean shift-out of captured response");

    // (2) random taps and nodes against the reference
    ref_q = q;
    for (int c = 0; c < 400; c++) begin
      tap = {$urandom, $urandom}; node = {$urandom, $urandom};
      scan_in = $urandom;
      se = ($urandom % 8) != 0;
      di = {$urandom, $urandom, $urandom, $urandom};
      ref_q = se ? ref_step(ref_q, scan_in, tap, node) : di;
      @(negedge clk);
      chk(q, ref_q, "random step");
    end

    // (3) one active point inverts what passes it
    for (int i = 0; i < N; i += 9) begin
      rst = 1; #1 rst = 0;
      se = 1; tap = '0; node = '0;
      tap[i] = 1;
      pat = {$urandom, $urandom, $urandom, $urandom};
      for (int k = 0; k < L; k++) begin
        scan_in = pat[L-1-k];
        @(negedge clk);
      end
      chk(q, pat, "tap=1, node=0 leaves data clean");
      rst = 1; #1 rst = 0;
      node[i] = 1;
      for (int k = 0; k < L; k++) begin
        scan_in = pat[L-1-k];
        @(negedge clk);
      end
      for (int j = 0; j < L; j++) got[j] = pat[j] ^ (j > pos[i]);
      chk(q, got, "single point inverts downstream bits");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_secure_scan_top: end-to-end test of the secure scan structure at its
// default sizes (64-bit test authorization code, 128 scan flip-flops).
//
// A small stand-in circuit under test closes the loop: its next state is a
// rotate-and-XOR of the flop outputs and its 64 obfuscation nodes are XORs
// of flop pairs. A cycle-accurate reference model, written from the
// structure's description (counter, NSR with Q/Qbar muxes, DF1, scan chain
// with NAND/XNOR points), runs beside the DUT and every state element is
// compared each clock through the ports. On top of that the test checks the externally visible
// behaviour: the right code is computed in closed form from the NVM word and
// the scan key, gives a clean scan (pattern in = pattern out, captured
// response shifts out intact) and freezes the NSR; a wrong code sets DF1,
// makes the NSR rotate and scrambles scan data; in functional mode nothing
// of the protection moves; reprogramming the NVM changes the right code.
// Each of these mechanisms is counted and must occur.
module tb_secure_scan_top;
  import secscan_pkg::*;
  localparam int N = N_AUTH_DEFAULT, L = SCAN_LEN_DEFAULT;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, se, code_in, scan_in, scan_out, nvm_we, auth_done, auth_fail;
  logic [L-1:0] cut_di, cut_q;
  logic [N-1:0] cut_node, nvm_data;

  secure_scan_top dut (.*);

  // ---------------- stand-in circuit under test ----------------
  function automatic logic [L-1:0] cut_next(input logic [L-1:0] s);
    return {s[L-2:0], s[L-1]} ^ (s >> 3) ^ L'(128'h9E37_79B9_7F4A_7C15_F39C_C060_5CED_C834);
  endfunction
  function automatic logic [N-1:0] cut_nodes(input logic [L-1:0] s);
    logic [N-1:0] n;
    for (int i = 0; i < N; i++) n[i] = s[(3*i+1)%L] ^ s[(5*i+7)%L] ^ s[(7*i+2)%L];
    return n;
  endfunction
  always_comb begin
    cut_di   = cut_next(cut_q);
    cut_node = cut_nodes(cut_q);
  end

  // ---------------- reference model ----------------
  logic [N-1:0] r_cfg, r_nsr;
  logic [L-1:0] r_chain;
  int           r_cnt;
  logic         r_q1;
  int           pos[N];

  task automatic ref_reset();
    r_nsr = '0; r_chain = '0; r_cnt = 0; r_q1 = 0;
  endtask

  function automatic logic [N-1:0] nsr_step(input logic [N-1:0] s, input logic fb, cin,
                                            input logic [N-1:0] c);
    logic [N-1:0] nx;
    nx[0] = fb ? (c[N-1] ? s[N-1] : ~s[N-1]) : cin;
    for (int i = 1; i < N; i++) nx[i] = c[i-1] ? s[i-1] : ~s[i-1];
    return nx;
  endfunction

  task automatic ref_clock(input logic s_e, cin, sin);
    logic         entering, shifting;
    logic [N-1:0] nsr_n, taps;
    logic [L-1:0] fl, ch_n;
    entering = s_e && (r_cnt < N);
    shifting = s_e && (entering || r_q1);
    nsr_n = nsr_step(r_nsr, r_cnt == N, cin, r_cfg);
    // scan chain uses the present NSR state
    taps = r_nsr ^ SCAN_KEY_DEFAULT;
    fl = '0;
    for (int i = 0; i < N; i++) fl[pos[i]] = taps[i] & cut_nodes(r_chain)[i];
    if (s_e) begin
      ch_n[0] = sin;
      for (int j = 1; j < L; j++) ch_n[j] = r_chain[j-1] ^ fl[j-1];
    end else ch_n = cut_next(r_chain);
    if (entering && r_cnt == N - 1) r_q1 = |(nsr_n ^ SCAN_KEY_DEFAULT);
    if (entering) r_cnt++;
    if (shifting) r_nsr = nsr_n;
    r_chain = ch_n;
  endtask

  // ---------------- checking ----------------
  task automatic chk(input logic [L-1:0] g, e, input string what);
    checks++;
    if (g !== e) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h", what, g, e);
    end
  endtask

  task automatic compare_all();
    chk(cut_q, r_chain, "scan chain");
    chk(L'(auth_done), L'(r_cnt == N), "Cout");
    chk(L'(auth_fail), L'(r_q1), "DF1");
    chk(L'(scan_out), L'(r_chain[L-1]), "scan_out");
  endtask

  // one clock with the given inputs, applied after the falling edge
  task automatic tick(input logic s_e, cin, sin);
    se = s_e; code_in = cin; scan_in = sin;
    #1 ref_clock(s_e, cin, sin);
    @(negedge clk);
    compare_all();
  endtask

  task automatic do_reset();
    rst = 1; ref_reset();
    @(negedge clk); rst = 0;
    compare_all();
  endtask

  // right code from the closed form: cell j ends with code bit N-j (1-based)
  // inverted once per 0 among cfg[0..j-1]; code[k-1] is X_k, sent first
  function automatic logic [N-1:0] right_code(input logic [N-1:0] c, key);
    logic [N-1:0] x;
    logic par;
    par = 0;
    for (int j = 0; j < N; j++) begin
      x[N-1-j] = key[j] ^ par;
      par ^= ~c[j];
    end
    return x;
  endfunction

  // mechanism counters
  int n_func = 0, n_clean = 0, n_frozen = 0, n_fail = 0, n_rotate = 0,
      n_scramble = 0, n_hold_func = 0, n_reprog = 0;

  logic [N-1:0] code, s_before;
  logic [L-1:0] pat, resp, got;
  int           nd;

  task automatic enter_code(input logic [N-1:0] c);
    for (int k = 0; k < N; k++) begin
      tick(1, c[k], 0);
      chk(L'(auth_done), L'(k == N - 1), "Cout rises after the N-th code bit");
    end
  endtask

  // shift a pattern in, capture once, shift the response out
  task automatic scan_session(output logic [L-1:0] loaded, output logic [L-1:0] out);
    pat = {$urandom, $urandom, $urandom, $urandom};
    for (int k = 0; k < L; k++) tick(1, 0, pat[L-1-k]);
    loaded = cut_q;
    tick(0, 0, 0);
    resp = cut_q;
    for (int k = 0; k < L; k++) begin
      out[L-1-k] = scan_out;
      tick(1, 0, 1'($urandom));
    end
  endtask

  logic [L-1:0] loaded, out;

  initial begin
    for (int i = 0; i < N; i++) pos[i] = obf_pos(i, N, L);
    r_cfg = NVM_CFG_DEFAULT;
    se = 0; code_in = 0; scan_in = 0; nvm_we = 0; nvm_data = '0;
    do_reset();

    // ---- functional mode: protection idle ----
    for (int c = 0; c < 20; c++) tick(0, 1'($urandom), 1'($urandom));
    chk(L'(r_nsr), '0, "reference NSR idle in functional mode");
    chk(L'(auth_done), 0, "CT1 idle in functional mode");
    n_func++;

    // ---- right code: clean scan, NSR frozen ----
    code = right_code(NVM_CFG_DEFAULT, SCAN_KEY_DEFAULT);
    enter_code(code);
    chk(L'(r_nsr), L'(SCAN_KEY_DEFAULT), "reference NSR holds the scan key");
    chk(L'(auth_fail), 0, "DF1 clear for the right code");
    scan_session(loaded, out);
    chk(loaded, pat, "clean scan-in");
    chk(out, cut_next(pat), "clean scan-out of the response");
    if (loaded == pat && out == cut_next(pat)) n_clean++;
    // a frozen NSR at the scan key is the only state that keeps the
    // chain clean while the nodes toggle
    if (r_nsr == SCAN_KEY_DEFAULT && out == cut_next(pat)) n_frozen++;

    // ---- wrong codes: DF1 set, NSR rotates, data scrambled ----
    for (int t = 0; t < 4; t++) begin
      do_reset();
      code = right_code(NVM_CFG_DEFAULT, SCAN_KEY_DEFAULT);
      if (t == 0) begin                            // one wrong bit
        nd = int'($urandom % N);
        code[nd] = ~code[nd];
      end
      else        code = {$urandom, $urandom};
      enter_code(code);
      chk(L'(auth_fail), 1, "DF1 set for a wrong code");
      if (auth_fail) n_fail++;
      // rotation is seen through the chain: the DUT tracks the reference,
      // whose NSR rotates, through a whole scan session
      s_before = r_nsr;
      nd = failures;
      tick(1, 0, 0);
      scan_session(loaded, out);
      if (r_nsr != s_before && failures == nd) n_rotate++;
      if (loaded != pat || out != cut_next(pat)) n_scramble++;
      // functional mode stops the rotation
      // SE low: the reference NSR holds; the next scan session shows whether
      // the DUT held too
      s_before = r_nsr;
      for (int c = 0; c < 5; c++) tick(0, 0, 0);
      chk(L'(r_nsr), L'(s_before), "reference NSR holds while SE is low");
      nd = failures;
      scan_session(loaded, out);
      if (failures == nd) n_hold_func++;
    end

    // ---- reprogram the NVM: the right code changes ----
    nvm_data = NVM_CFG_DEFAULT ^ 64'h0000_0000_0000_0001;
    @(negedge clk); nvm_we = 1;
    @(negedge clk); nvm_we = 0;
    r_cfg = nvm_data;
    do_reset();
    enter_code(right_code(NVM_CFG_DEFAULT, SCAN_KEY_DEFAULT));   // old code
    chk(L'(auth_fail), 1, "old code rejected after reprogramming");
    do_reset();
    enter_code(right_code(r_cfg, SCAN_KEY_DEFAULT));
    chk(L'(auth_fail), 0, "new code accepted after reprogramming");
    scan_session(loaded, out);
    chk(out, cut_next(pat), "clean scan with the new code");
    if (!auth_fail && out == cut_next(pat)) n_reprog++;

    $display("mechanisms: functional=%0d clean_scan=%0d nsr_frozen=%0d wrong_code=%0d nsr_rotation=%0d scrambled=%0d hold_in_functional=%0d reprogrammed=%0d",
             n_func, n_clean, n_frozen, n_fail, n_rotate, n_scramble, n_hold_func, n_reprog);
    checks += 8;
    if (n_func == 0)      failures++;
    if (n_clean == 0)     failures++;
    if (n_frozen == 0)    failures++;
    if (n_fail == 0)      failures++;
    if (n_rotate == 0)    failures++;
    if (n_scramble == 0)  failures++;
    if (n_hold_func == 0) failures++;
    if (n_reprog == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

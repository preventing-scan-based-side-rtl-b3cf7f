// tb_secure_scan_example: the 5-bit worked example run through the whole
// secure scan structure.
//
// NVM word 01101 (first NSR cell's mux first), connection style giving scan
// key 11001, scan chain of 8 flops. Every one of the 32 possible 5-bit codes
// is entered after a reset; only X5..X1 = 10111 (X1 sent first) may clear
// the lock flip-flop, and only then must a pattern shifted through the chain
// come out unchanged. For the 31 wrong codes the test also checks that a
// wrong code scrambles the chain at least once with nodes held at 1.
module tb_secure_scan_example;
  localparam int N = 5, L = 8;
  localparam logic [N-1:0] CFG = 5'b10110;   // cfg[0..4] = 0,1,1,0,1
  localparam logic [N-1:0] KEY = 5'b10011;   // cells 1..5 = 1,1,0,0,1

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, se, code_in, scan_in, scan_out, nvm_we, auth_done, auth_fail;
  logic [L-1:0] cut_di, cut_q;
  logic [N-1:0] cut_node, nvm_data;

  secure_scan_top #(.N_AUTH(N), .SCAN_LEN(L), .NVM_INIT(CFG), .SCAN_KEY(KEY)) dut (.*);

  assign cut_di   = ~cut_q;
  assign cut_node = '1;

  logic [N:1]   X;
  logic [L-1:0] pat, got;
  int           accepted, scrambled;

  initial begin
    nvm_we = 0; nvm_data = '0; se = 0; code_in = 0; scan_in = 0;
    accepted = 0; scrambled = 0;
    for (int c = 0; c < 32; c++) begin
      X = N'(c);
      rst = 1; @(negedge clk); rst = 0;
      se = 1;
      for (int k = 1; k <= N; k++) begin
        code_in = X[k];
        @(negedge clk);
      end
      checks++;
      if (!auth_done) begin failures++; $display("FAIL Cout not set after 5 bits"); end
      checks++;
      if (auth_fail !== (X != 5'b10111)) begin
        failures++;
        $display("FAIL code %b: auth_fail=%b", X, auth_fail);
      end
      if (!auth_fail) accepted++;
      // shift a pattern in and read the chain
      pat = 8'hB4;
      for (int k = 0; k < L; k++) begin
        scan_in = pat[L-1-k];
        @(negedge clk);
      end
      got = cut_q;
      if (X == 5'b10111) begin
        checks++;
        if (got !== pat) begin failures++; $display("FAIL clean scan got %h", got); end
      end else if (got !== pat) scrambled++;
      se = 0;
    end
    checks += 2;
    if (accepted != 1) begin failures++; $display("FAIL %0d codes accepted", accepted); end
    if (scrambled == 0) begin failures++; $display("FAIL wrong codes never scrambled"); end
    $display("accepted=%0d scrambled=%0d of 31 wrong codes", accepted, scrambled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

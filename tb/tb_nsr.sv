// tb_nsr: self-checking test of the configurable nonlinear shift register.
//
// Part 1 runs the worked 5-cell example: NVM word 01101 (cell 1 first),
// code X5..X1 = 10111 entered X1 first, and checks the register against the
// printed state table row by row, ending in scan key 11001. Part 2 uses a
// 64-cell register with random NVM words and codes and checks the final
// state against a closed form: after N loads, cell j holds code bit N-j
// inverted once for every 0 among cfg[0..j-1]. Part 3 checks rotation with
// feedback (cell 0 takes the last cell through its mux) and the hold when
// shift_en is low.
module tb_nsr;
  logic clk = 0, rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- 5-cell example ----------------
  logic       s_en, s_fb, s_code;
  logic [4:0] s_cfg, s_state, s_next;
  nsr #(.N(5)) u_small (.clk, .rst, .shift_en(s_en), .sel_feedback(s_fb),
                        .code_in(s_code), .cfg(s_cfg), .state(s_state),
                        .state_next(s_next));

  // ---------------- 64-cell random ----------------
  localparam int NB = 64;
  logic          b_en, b_fb, b_code;
  logic [NB-1:0] b_cfg, b_state, b_next;
  nsr #(.N(NB)) u_big (.clk, .rst, .shift_en(b_en), .sel_feedback(b_fb),
                       .code_in(b_code), .cfg(b_cfg), .state(b_state),
                       .state_next(b_next));

  task automatic check(input logic [NB-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // state written cell1..cell5 as in the table; bit 0 = cell 1
  function automatic logic [4:0] cells(input logic c1, c2, c3, c4, c5);
    return {c5, c4, c3, c2, c1};
  endfunction

  logic [5:1] X;
  logic [NB-1:0] code, exp, rot;
  int zeros;

  initial begin
    rst = 1; s_en = 0; s_fb = 0; s_code = 0; b_en = 0; b_fb = 0; b_code = 0;
    s_cfg = cells(0, 1, 1, 0, 1);      // NVM word 01101
    b_cfg = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(NB'(s_state), '0, "reset state");

    // code X5..X1 = 10111
    X = 5'b10111;
    s_en = 1;
    for (int k = 1; k <= 5; k++) begin
      s_code = X[k];
      @(posedge clk); #1;
      case (k)
        1: exp = NB'(cells(X[1], 1, 0, 0, 1));
        2: exp = NB'(cells(X[2], ~X[1], 1, 0, 1));
        3: exp = NB'(cells(X[3], ~X[2], ~X[1], 1, 1));
        4: exp = NB'(cells(X[4], ~X[3], ~X[2], ~X[1], 0));
        5: exp = NB'(cells(X[5], ~X[4], ~X[3], ~X[2], X[1]));
      endcase
      check(NB'(s_state), exp, $sformatf("table row %0d", k));
    end
    s_en = 0;
    check(NB'(s_state), NB'(cells(1, 1, 0, 0, 1)), "scan key 11001");

    // ---------------- random 64-cell runs ----------------
    for (int t = 0; t < 20; t++) begin
      b_cfg = {$urandom, $urandom};
      code  = {$urandom, $urandom};   // code[k-1] = X_k
      #1 rst = 1; #1 rst = 0;
      b_en = 1; b_fb = 0;
      for (int k = 0; k < NB; k++) begin
        b_code = code[k];
        @(posedge clk); #1;
      end
      b_en = 0;
      for (int j = 0; j < NB; j++) begin
        zeros = 0;
        for (int m = 0; m < j; m++) zeros += (b_cfg[m] == 1'b0);
        exp[j] = code[NB-1-j] ^ zeros[0];
      end
      check(b_state, exp, "64-cell closed form");
      // hold
      @(posedge clk); #1;
      check(b_state, exp, "hold with shift_en low");
      // one rotation step with feedback
      for (int j = 0; j < NB; j++)
        rot[(j+1)%NB] = b_cfg[j] ? exp[j] : ~exp[j];
      b_fb = 1; b_en = 1;
      @(posedge clk); #1;
      check(b_state, rot, "rotate step");
      b_en = 0; b_fb = 0;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

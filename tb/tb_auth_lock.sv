// tb_auth_lock: self-checking test of the key check and lock flip-flop DF1.
//
// Drives EN/last and the next-state taps directly. Checks that shift_en
// follows SE during code entry, that DF1 captures 0 when all taps are 0 on
// the last entry cycle (NSR frozen afterwards) and 1 when any single tap is
// 1 (NSR keeps shifting while SE is high, stops when SE is low), and that DF1
// ignores the taps outside the last entry cycle.
module tb_auth_lock;
  localparam int N = 64;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic se, en, last, q1, shift_en;
  logic [N-1:0] tap_next;
  auth_lock #(.N(N)) dut (.clk, .rst, .se, .en, .last, .tap_next, .q1, .shift_en);

  task automatic chk(input logic got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b", what, got, exp); end
  endtask

  task automatic run(input logic [N-1:0] final_taps, input logic exp_q1);
    rst = 1; se = 0; en = 0; last = 0; tap_next = '1;
    @(negedge clk);
    rst = 0;
    chk(shift_en, 0, "idle");
    se = 1; en = 1;
    for (int k = 1; k <= N; k++) begin
      last = (k == N);
      tap_next = (k == N) ? final_taps : N'({$urandom, $urandom}) | 1;
      #1 chk(shift_en, 1, "shift during entry");
      @(negedge clk);
      if (k < N) chk(q1, 0, "q1 before last");
    end
    en = 0; last = 0; tap_next = N'({$urandom, $urandom});
    chk(q1, exp_q1, "q1 after entry");
    repeat (3) begin
      #1 chk(shift_en, exp_q1, "shift after entry");
      @(negedge clk);
      chk(q1, exp_q1, "q1 holds");
    end
    se = 0;
    #1 chk(shift_en, 0, "no shift in functional mode");
  endtask

  initial begin
    run('0, 0);
    for (int b = 0; b < N; b += 7) run(N'(1) << b, 1);
    run('1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

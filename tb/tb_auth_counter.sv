// tb_auth_counter: self-checking test of the code-entry counter CT1.
//
// Checks that the counter idles while SE is low, that EN is high for
// exactly N clocks after SE rises with 'last' on the N-th, that cout then
// rises and stays high (hold) through SE toggling, and that reset restarts
// the count. Run for N = 5 and N = 64.
module tb_auth_counter;
  logic clk = 0, rst;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic se;
  logic en5, last5, cout5, en64, last64, cout64;
  auth_counter #(.N(5))  u5  (.clk, .rst, .se, .en(en5),  .last(last5),  .cout(cout5));
  auth_counter #(.N(64)) u64 (.clk, .rst, .se, .en(en64), .last(last64), .cout(cout64));

  task automatic chk(input logic got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b", what, got, exp); end
  endtask

  int n_en5, n_en64, first_last5, first_last64, cyc;

  initial begin
    rst = 1; se = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // functional mode: nothing moves
    repeat (10) begin
      @(posedge clk); #1;
      chk(en5, 0, "en idle"); chk(cout5, 0, "cout idle"); chk(cout64, 0, "cout64 idle");
    end
    se = 1; #1;
    n_en5 = 0; n_en64 = 0; first_last5 = -1; first_last64 = -1;
    for (cyc = 1; cyc <= 80; cyc++) begin
      // values during clock cycle 'cyc' of test mode
      if (en5) n_en5++;
      if (en64) n_en64++;
      if (last5 && first_last5 < 0) first_last5 = cyc;
      if (last64 && first_last64 < 0) first_last64 = cyc;
      chk(cout5, cyc > 5, "cout5 timing");
      chk(cout64, cyc > 64, "cout64 timing");
      @(posedge clk); #1;
    end
    checks += 4;
    if (n_en5 != 5)   begin failures++; $display("FAIL en5 count %0d", n_en5); end
    if (n_en64 != 64) begin failures++; $display("FAIL en64 count %0d", n_en64); end
    if (first_last5 != 5)   begin failures++; $display("FAIL last5 at %0d", first_last5); end
    if (first_last64 != 64) begin failures++; $display("FAIL last64 at %0d", first_last64); end
    // SE toggling does not restart the count
    se = 0; @(posedge clk); #1; se = 1; @(posedge clk); #1;
    chk(cout5, 1, "hold after SE toggle"); chk(en5, 0, "en low in hold");
    // reset restarts
    rst = 1; #1; rst = 0;
    chk(cout5, 0, "cout cleared"); chk(en5, 1, "en back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

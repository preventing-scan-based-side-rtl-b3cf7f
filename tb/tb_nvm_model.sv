// tb_nvm_model: self-checking test of the nonvolatile configuration memory
// model: power-up contents equal INIT, a programming write is visible after
// the clock edge, and the word is kept while prog_we is low.
module tb_nvm_model;
  localparam int N = 64;
  localparam logic [N-1:0] INIT = 64'h0123_4567_89AB_CDEF;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we;
  logic [N-1:0] data, cfg, word;
  nvm_model #(.N_BITS(N), .INIT(INIT)) dut (.clk, .prog_we(we), .prog_data(data), .cfg);

  task automatic chk(input logic [N-1:0] g, e, input string what);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", what, g, e); end
  endtask

  initial begin
    we = 0; data = '0;
    #1 chk(cfg, INIT, "power-up contents");
    for (int t = 0; t < 20; t++) begin
      word = {$urandom, $urandom};
      @(negedge clk); we = 1; data = word;
      @(negedge clk); we = 0; data = ~word;
      chk(cfg, word, "programmed word");
      repeat (3) @(negedge clk);
      chk(cfg, word, "word retained");
    end
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

// auth_counter: modulo-N counter CT1 with its enable gate GT4.
//
// After reset the count is 0 and the carry output cout is 0. While the scan
// enable SE is high and cout is low, the enable EN = SE AND NOT cout is high
// and the counter advances once per clock; this marks the N clock cycles in
// which the test authorization code is entered. When N cycles have been
// counted cout rises, EN falls and the counter holds until the next reset,
// so the code can be entered only once per reset. In functional mode
// (SE = 0) EN is low and the counter does not move. The counter structure
// and EN come from the original design; holding until reset (rather than
// wrapping) and the count running 0..N are this design's reading of
// "enters the hold mode".
//
// Interface: en is EN (high on each code-entry cycle); last is high on the
// final code-entry cycle; cout is the carry, high from the edge that ends
// the N-th entry cycle. Reset is asynchronous, active high.
module auth_counter #(
  parameter int unsigned N = secscan_pkg::N_AUTH_DEFAULT
) (
  input  logic clk,
  input  logic rst,
  input  logic se,
  output logic en,
  output logic last,
  output logic cout
);

  localparam int unsigned CW = $clog2(N + 1);
  localparam logic [CW-1:0] LAST_CNT = CW'(N - 1);
  localparam logic [CW-1:0] FULL_CNT = CW'(N);

  logic [CW-1:0] cnt;

  assign cout = (cnt == FULL_CNT);
  assign en   = se & ~cout;                 // GT4
  assign last = en & (cnt == LAST_CNT);

  always_ff @(posedge clk or posedge rst)
    if (rst)     cnt <= '0;
    else if (en) cnt <= cnt + 1'b1;

  // Code entry happens once per reset: the carry never falls again.
  a_cout_holds: assert property (@(posedge clk) disable iff (rst) cout |=> cout);

endmodule

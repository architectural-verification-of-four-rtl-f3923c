// reservation_station_tb: random test of the reservation station under both issue
// policies (out of order for the ALUs and branch unit, in order for memory and
// multiply/divide). Stimulus and the reference model are in rs_check; this module
// supplies the clock and watchdog and sums the results of the two checkers.
module reservation_station_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int c0, f0, c1, f1;
  logic d0, d1;
  rs_check #(.IN_ORDER(1'b0)) ooo (.clk, .checks_o(c0), .failures_o(f0), .done_o(d0));
  rs_check #(.IN_ORDER(1'b1)) ino (.clk, .checks_o(c1), .failures_o(f1), .done_o(d1));
  initial begin
    fork
      begin wait (d0 && d1); end
      begin repeat (20000) @(posedge clk); $display("FAIL watchdog"); end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + 1, f0 + f1 + int'(!(d0 && d1)));
    $finish;
  end
endmodule

// tb_ttbc_top_sweep: runs the TTBC architecture at 4, 6 and 7 tester
// channels (13, 61 and 125 scan chains) on the six benchmark-sized
// workloads, one harness per configuration running side by side, and sums
// their checks. A watchdog ends the run if a harness stalls.
module tb_ttbc_top_sweep;
  logic done4, done6, done7;
  int   c4, c6, c7, f4, f6, f7;

  tb_ttbc_harness #(.I(4)) h4 (.done(done4), .checks(c4), .failures(f4));
  tb_ttbc_harness #(.I(6)) h6 (.done(done6), .checks(c6), .failures(f6));
  tb_ttbc_harness #(.I(7)) h7 (.done(done7), .checks(c7), .failures(f7));

  initial begin
    #50ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c6 + c7, f4 + f6 + f7 + 1);
    $finish;
  end

  initial begin
    wait (done4 === 1'b1 && done6 === 1'b1 && done7 === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c6 + c7, f4 + f6 + f7);
    $finish;
  end
endmodule

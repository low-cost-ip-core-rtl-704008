// ttbc_tff: T flip-flop with synchronous SET and RESET, one per scan chain in
// the TTBC decoder.
//
// Characteristic table (SET has no priority over RESET because the decoder
// never raises both):
//   set=1, rst=0 -> 1      set=0, rst=1 -> 0
//   t=0            -> hold  t=1          -> toggle
// The table is the method's; making SET/RESET synchronous (they are driven by
// the clocked decoder and act on the same edge as T) and adding the
// asynchronous active-low test reset rst_n, which clears the bit, are choices
// of this design. If set and rst were both high, rst wins.
//
// Ports: clk, rst_n, t, set, rst -> q.  Latency: q changes one edge after
// the control inputs.
module ttbc_tff (
  input  logic clk,
  input  logic rst_n,
  input  logic t,
  input  logic set,
  input  logic rst,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= 1'b0;
    else if (rst)  q <= 1'b0;
    else if (set)  q <= 1'b1;
    else if (t)    q <= ~q;
  end

endmodule

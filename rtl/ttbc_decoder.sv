// ttbc_decoder: I-to-S tri-template decoder (S <= 2^I - 3).
//
// Each clock the I channel bits carry one code. A general I-to-2^I decoder
// turns it into one active line:
//   code k < S        flipping mode: the T flip-flop of chain k toggles.
//   code 2^I-3        template "previous slice": all flip-flops hold.
//   code 2^I-2        template "all 0": all flip-flops reset.
//   code 2^I-1        template "all 1": all flip-flops set.
// The three template lines are ORed into SCE (shift clock enable). While SCE
// is high the scan chains and the response compactor shift, taking the slice
// the flip-flops hold now (the slice finished by the previous flips), while
// the same clock edge loads the template of the next slice. So a slice
// costs one template cycle plus one cycle per flipped bit, and is shifted in
// by the template code that starts the next slice.
//
// Codes S .. 2^I-4 (present only when S < 2^I-3) are ignored. While hold is
// high (the capture cycle) the channel is ignored and SCE is low; this hold
// input and the reset of all flip-flops to 0 are this design's choices.
//
// Ports: clk, rst_n, hold, ch[I-1:0] -> slice[S-1:0] (parallel scan-in
// data, valid in the cycle SCE is high), sce (combinational from ch/hold),
// flip (combinational, a flip code is being applied).
module ttbc_decoder
  import ttbc_pkg::*;
#(
  parameter int unsigned I = 5,
  parameter int unsigned S = max_chains(I)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         hold,
  input  logic [I-1:0] ch,
  output logic [S-1:0] slice,
  output logic         sce,
  output logic         flip
);

  localparam int unsigned NCODE = 1 << I;
  localparam int unsigned CPREV = template_code(I, TPL_PREV);
  localparam int unsigned CZERO = template_code(I, TPL_ZERO);
  localparam int unsigned CONE  = template_code(I, TPL_ONE);

  logic [NCODE-1:0] y;

  ttbc_bin_decoder #(.N(I)) u_dec (
    .en   (!hold),
    .code (ch),
    .y    (y)
  );

  // The OR gate of the decoder: any template line enables the shift clock.
  assign sce  = y[CPREV] | y[CZERO] | y[CONE];
  assign flip = |y[S-1:0];

  for (genvar k = 0; k < S; k++) begin : g_bit
    ttbc_tff u_tff (
      .clk   (clk),
      .rst_n (rst_n),
      .t     (y[k]),
      .set   (y[CONE]),
      .rst   (y[CZERO]),
      .q     (slice[k])
    );
  end

  // A decoder with I inputs serves at most 2^I-3 chains, and needs I > 2.
  initial begin
    assert (I > 2 && S >= 1 && S <= max_chains(I))
      else $error("ttbc_decoder: S=%0d not in 1..2^I-3 for I=%0d", S, I);
  end

  // Flipping and template modes are exclusive.
  a_mode_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(sce && flip));

endmodule

// ttbc_misr: multiple-input signature register used as the output response
// analyzer (ORA).
//
// On each clock with en high the register shifts one place towards the MSB,
// the feedback bit (XOR of the tapped stages) enters stage 0, and the W scan
// outputs are XORed in, one per stage. With en low it holds. The method
// names a MISR as the compactor; the internal-XOR form, the tap choice
// (ttbc_pkg::misr_taps) and the reset value 0 are this design's choices.
//
// Ports: clk, rst_n, en, d[W-1:0] -> sig[W-1:0].  The signature includes d
// one edge after en.
module ttbc_misr
  import ttbc_pkg::*;
#(
  parameter int unsigned     W    = 29,
  parameter logic [W-1:0]    TAPS = W'(misr_taps(W))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] sig
);

  logic fb;
  assign fb = ^(sig & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sig <= '0;
    else if (en) sig <= {sig[W-2:0], fb} ^ d;
  end

endmodule

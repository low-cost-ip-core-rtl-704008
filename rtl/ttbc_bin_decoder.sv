// ttbc_bin_decoder: general N-to-2^N decoder with active-high outputs, the
// front end of the TTBC decoder.
//
// Output y[k] is 1 exactly when code == k; with en low all outputs are 0.
// Purely combinational.
//
// Ports: en, code[N-1:0] -> y[2^N-1:0].
module ttbc_bin_decoder #(
  parameter int unsigned N = 5
) (
  input  logic               en,
  input  logic [N-1:0]       code,
  output logic [(1<<N)-1:0]  y
);

  always_comb begin
    y = '0;
    if (en) y[code] = 1'b1;
  end

endmodule

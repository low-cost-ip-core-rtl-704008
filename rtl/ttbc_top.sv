// ttbc_top: on-chip part of the tri-template test architecture for a
// scan-tested IP core.
//
// I tester channels carry the TTBC code stream into the decoder, which
// builds each scan slice from a template (previous slice, all 0, all 1) plus
// single-bit flips and drives it in parallel into the S scan chains of the
// core. The decoder's SCE doubles as the scan shift enable. A slice counter
// raises capture for one cycle after each complete vector; during that
// cycle the channel value is ignored. The scan outputs are compacted in a
// MISR, clocked by SCE once the first response has been captured.
//
// The core itself is outside this module: scan_in/scan_en/capture go to it
// and scan_out comes back. Timing: scan_in is valid, and the chains must
// shift, on each rising clock edge where scan_en is high; capture is a
// one-cycle pulse; scan_out is sampled on the same edges as scan_in.
//
// The architecture and the decoder follow the method; the capture slot, the
// MISR details and slices_per_vector as an input are this design's choices.
//
// Ports: clk, rst_n, ch[I-1:0], slices_per_vector[CW-1:0] -> scan_in[S-1:0],
// scan_en, capture, scan_out[S-1:0] in, signature[S-1:0], and status
// outputs flip (a flip code is applied this cycle), slice_cnt (slices of the
// current vector loaded) and vector_cnt (vectors captured).
module ttbc_top
  import ttbc_pkg::*;
#(
  parameter int unsigned I  = 5,
  parameter int unsigned S  = max_chains(I),
  parameter int unsigned CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [I-1:0]  ch,
  input  logic [CW-1:0] slices_per_vector,
  output logic [S-1:0]  scan_in,
  output logic          scan_en,
  output logic          capture,
  input  logic [S-1:0]  scan_out,
  output logic [S-1:0]  signature,
  output logic          flip,
  output logic [CW-1:0] slice_cnt,
  output logic [31:0]   vector_cnt
);

  logic          sce;
  logic          ora_en;

  ttbc_decoder #(.I(I), .S(S)) u_decoder (
    .clk   (clk),
    .rst_n (rst_n),
    .hold  (capture),
    .ch    (ch),
    .slice (scan_in),
    .sce   (sce),
    .flip  (flip)
  );

  ttbc_capture_ctrl #(.CW(CW)) u_capture (
    .clk               (clk),
    .rst_n             (rst_n),
    .sce               (sce),
    .slices_per_vector (slices_per_vector),
    .capture           (capture),
    .ora_en            (ora_en),
    .slice_cnt         (slice_cnt),
    .vector_cnt        (vector_cnt)
  );

  ttbc_misr #(.W(S)) u_ora (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (sce & ora_en),
    .d     (scan_out),
    .sig   (signature)
  );

  assign scan_en = sce;

endmodule

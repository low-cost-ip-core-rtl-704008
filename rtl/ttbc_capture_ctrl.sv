// ttbc_capture_ctrl: scan load / capture control of the TTBC architecture.
//
// The decoder shifts one slice into the scan chains on every cycle that SCE
// is high, so counting SCE cycles counts loaded slices. When the count
// reaches slices_per_vector (the scan chain length, a static setting), the
// vector is fully loaded and capture is raised for exactly the next cycle;
// the decoder holds and the core captures its response. The next SCE cycles
// shift that response out while the next vector goes in.
//
// Because a slice is shifted by the template that starts the following
// slice, the very first SCE after reset shifts the decoder's reset value and
// belongs to no vector: it is not counted. ora_en goes high after the first
// capture, so the compactor only sees shifted-out responses, never the
// unknown power-up content of the chains. The counting scheme follows the
// method; the one-cycle capture slot, the uncounted first shift and ora_en
// are this design's choices.
//
// Ports: clk, rst_n, sce, slices_per_vector[CW-1:0] (>= 1) -> capture,
// ora_en, slice_cnt[CW-1:0] (slices of the current vector loaded so far),
// vector_cnt[31:0] (captures so far).
module ttbc_capture_ctrl #(
  parameter int unsigned CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sce,
  input  logic [CW-1:0] slices_per_vector,
  output logic          capture,
  output logic          ora_en,
  output logic [CW-1:0] slice_cnt,
  output logic [31:0]   vector_cnt
);

  logic primed;
  logic last;

  assign last = (slice_cnt == slices_per_vector - CW'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      primed     <= 1'b0;
      slice_cnt  <= '0;
      capture    <= 1'b0;
      ora_en     <= 1'b0;
      vector_cnt <= '0;
    end else begin
      capture <= 1'b0;
      if (capture) begin
        ora_en     <= 1'b1;
        vector_cnt <= vector_cnt + 32'd1;
      end
      if (sce) begin
        if (!primed) begin
          primed <= 1'b1;
        end else if (last) begin
          slice_cnt <= '0;
          capture   <= 1'b1;
        end else begin
          slice_cnt <= slice_cnt + CW'(1);
        end
      end
    end
  end

  // The decoder must not shift during the capture slot.
  a_no_shift_in_capture: assert property (@(posedge clk) disable iff (!rst_n) capture |-> !sce);

endmodule

// tb_ttbc_harness: test harness for one TTBC configuration, used by
// tb_ttbc_top_sweep to run the top at the 4-, 6- and 7-channel sizes.
//
// Same procedure as tb_ttbc_top: for each of six benchmark-sized workloads it
// generates random test cubes, encodes them with the two-slice look-ahead
// template heuristic, streams the codes into ttbc_top with parameter I, and
// checks the loaded care bits at every capture, the capture slot, scan_en,
// the cycle count and the MISR signature against a reference compaction.
// It reports through its ports instead of finishing the simulation.
//
// Ports: done (all workloads finished), checks, failures.
module tb_ttbc_harness #(
  parameter int unsigned I = 4
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import ttbc_pkg::*;

  localparam int unsigned S    = (1 << I) - 3;
  localparam int unsigned CW   = 16;
  localparam int unsigned LMAX = 128;
  localparam logic [S-1:0] TAPS = S'(misr_taps(S));

  typedef logic [S-1:0] slice_t;
  typedef struct {
    logic [LMAX-1:0][S-1:0] m;   // care mask per slice
    logic [LMAX-1:0][S-1:0] v;   // care values per slice
  } cube_t;

  logic          clk = 1'b0;
  logic          rst_n;
  logic [I-1:0]  ch;
  logic [CW-1:0] spv;
  slice_t        scan_in, scan_out, signature;
  logic          scan_en, capture, flip;
  logic [CW-1:0] slice_cnt;
  logic [31:0]   vector_cnt;

  ttbc_top #(.I(I)) dut (
    .clk(clk), .rst_n(rst_n), .ch(ch), .slices_per_vector(spv),
    .scan_in(scan_in), .scan_en(scan_en), .capture(capture), .scan_out(scan_out),
    .signature(signature), .flip(flip), .slice_cnt(slice_cnt), .vector_cnt(vector_cnt));

  always #5 clk = ~clk;



  // ---------------- core under test model ---------------------------------
  int unsigned L = 1;
  logic [LMAX-1:0] chain [S];
  cube_t  exp_q [$];
  slice_t ref_sig;
  logic   ref_ora;
  int     n_cap_checked = 0, n_ora_shift = 0;

  always_comb
    for (int c = 0; c < S; c++) scan_out[c] = chain[c][L-1];

  always @(posedge clk) begin
    if (!rst_n) begin
      ref_sig <= '0;
      ref_ora <= 1'b0;
    end else if (capture) begin
      logic [LMAX-1:0] nxt [S];
      if (exp_q.size() > 0) begin
        cube_t cb;
        int bad;
        cb = exp_q.pop_front();
        bad = 0;
        for (int j = 0; j < int'(L); j++)
          for (int c = 0; c < S; c++)
            if (cb.m[j][c] && chain[c][L-1-j] !== cb.v[j][c]) bad++;
        checks++;
        n_cap_checked++;
        if (bad != 0) begin
          failures++;
          $display("vector %0d: %0d care bits wrong at capture", vector_cnt, bad);
        end
      end
      for (int c = 0; c < S; c++)
        for (int k = 0; k < int'(L); k++)
          nxt[c][k] = chain[c][k] ^ chain[(c+1)%S][(k+1)%L] ^ k[0];
      for (int c = 0; c < S; c++) chain[c] <= nxt[c];
      ref_ora <= 1'b1;
    end else if (scan_en) begin
      if (ref_ora) begin
        ref_sig <= {ref_sig[S-2:0], ^(ref_sig & TAPS)} ^ scan_out;
        n_ora_shift++;
      end
      for (int c = 0; c < S; c++) chain[c] <= {chain[c][LMAX-2:0], scan_in[c]};
    end
  end

  // ---------------- tester side -------------------------------------------
  int n_flip = 0, n_tpl[3] = '{0, 0, 0}, n_capture = 0, n_junk_tpl = 0;
  int cycles = 0;

  always @(posedge clk) if (rst_n) cycles++;

  // Drive one channel word for one cycle and check the decoder's reaction.
  task automatic send(input logic [I-1:0] code, input logic cap_slot);
    @(negedge clk);
    ch = code;
    #1;
    checks++;
    if (capture !== cap_slot ||
        scan_en !== (!cap_slot && code >= I'(S)) ||
        flip    !== (!cap_slot && code <  I'(S))) begin
      failures++;
      $display("code %0d slot %b: capture=%b scan_en=%b flip=%b", code, cap_slot, capture, scan_en, flip);
    end
    if (capture) n_capture++;
    if (cap_slot && code >= I'(S)) n_junk_tpl++;
  endtask

  function automatic slice_t tmpl(template_e t, slice_t prev);
    case (t)
      TPL_ZERO: return '0;
      TPL_ONE:  return '1;
      default:  return prev;
    endcase
  endfunction

  function automatic int nflip(slice_t base, slice_t m, slice_t v);
    return $countones((base ^ v) & m);
  endfunction

  // Two-slice look-ahead template choice.
  function automatic template_e choose(slice_t prev, slice_t cm, slice_t cv, slice_t nm, slice_t nv);
    template_e best_t;
    int best;
    best = 1 << 30;
    best_t = TPL_PREV;
    for (int t = 0; t < 3; t++) begin
      slice_t b, r;
      int c1, c2;
      b  = tmpl(template_e'(t), prev);
      c1 = nflip(b, cm, cv);
      r  = (b & ~cm) | (cv & cm);
      c2 = S;
      for (int t2 = 0; t2 < 3; t2++) begin
        int c;
        c = nflip(tmpl(template_e'(t2), r), nm, nv);
        if (c < c2) c2 = c;
      end
      if (c1 + c2 < best) begin
        best = c1 + c2;
        best_t = template_e'(t);
      end
    end
    return best_t;
  endfunction

  function automatic cube_t gen_cube(int unsigned n_cells, int unsigned dens_pm);
    cube_t cb;
    cb.m = '0;
    cb.v = '0;
    for (int unsigned n = 0; n < n_cells; n++) begin
      int unsigned c, j;
      c = n / L;
      j = n % L;
      if (($urandom % 1000) < dens_pm) begin
        cb.m[j][c] = 1'b1;
        cb.v[j][c] = 1'($urandom);
      end
    end
    return cb;
  endfunction

  typedef struct {
    string       name;
    int unsigned n_cells;
    int unsigned n_vec;
    int unsigned dens_pm;   // care-bit density in 1/1000
    int unsigned paper_bits;  // compressed size reported for I = 5
  } workload_t;

  workload_t wl [6] = '{
    '{"s5378",  214, 111, 274, 15030},
    '{"s9234",  247, 159, 270, 23705},
    '{"s13207", 700, 236,  68, 43350},
    '{"s15850", 611, 126, 164, 31950},
    '{"s38417", 1664, 99, 319, 87850},
    '{"s38584", 1464, 136, 177, 88070}
  };

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    rst_n = 1'b0;
    ch = '0;
    spv = 16'd1;
    for (int c = 0; c < S; c++) chain[c] = '0;
    foreach (wl[w]) begin
      cube_t cur, nxt;
      slice_t prev, nm, nv, base, fl;
      template_e t;
      int codes, flips, slices, vec_before_cycles, cap_before;
      longint orig;
      L = (wl[w].n_cells + S - 1) / S;
      spv = CW'(L);
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      // Release just after a rising edge so that no edge sees a stale code.
      @(posedge clk);
      #1 rst_n = 1'b1;
      exp_q.delete();
      prev = '0;
      codes = 0; flips = 0; slices = 0;
      vec_before_cycles = cycles;
      cap_before = n_capture;
      cur = gen_cube(wl[w].n_cells, wl[w].dens_pm);
      nxt = gen_cube(wl[w].n_cells, wl[w].dens_pm);
      for (int v = 0; v < int'(wl[w].n_vec); v++) begin
        for (int j = 0; j < int'(L); j++) begin
          if (j < int'(L) - 1) begin nm = cur.m[j+1]; nv = cur.v[j+1]; end
          else if (v < int'(wl[w].n_vec) - 1) begin nm = nxt.m[0]; nv = nxt.v[0]; end
          else begin nm = '0; nv = '0; end
          t = choose(prev, cur.m[j], cur.v[j], nm, nv);
          base = tmpl(t, prev);
          fl = (base ^ cur.v[j]) & cur.m[j];
          send(I'(template_code(I, t)), 1'b0);
          n_tpl[int'(t)]++;
          codes++; slices++;
          // The first template of a vector shifts the previous vector's last slice.
          if (j == 0 && v > 0) send(I'($urandom), 1'b1);
          for (int k = 0; k < S; k++)
            if (fl[k]) begin
              send(I'(k), 1'b0);
              codes++; flips++; n_flip++;
            end
          prev = base ^ fl;
        end
        exp_q.push_back(cur);
        cur = nxt;
        nxt = gen_cube(wl[w].n_cells, wl[w].dens_pm);
      end
      // Shift the last slice in, capture, then shift the last response out.
      send(I'(template_code(I, TPL_PREV)), 1'b0);
      send(I'($urandom), 1'b1);
      // Edges so far (the capture slot's own edge is still ahead): one per
      // template, one per flip and one capture slot per vector, the extra
      // template above taking the place of the last slot.
      checks++;
      if (cycles - vec_before_cycles != slices + flips + int'(wl[w].n_vec)) begin
        failures++;
        $display("%s: %0d cycles, expected %0d", wl[w].name, cycles - vec_before_cycles,
                 slices + flips + wl[w].n_vec);
      end
      for (int j = 0; j < int'(L); j++) send(I'(template_code(I, TPL_PREV)), 1'b0);
      send(I'($urandom), 1'b1);
      @(negedge clk);
      checks++;
      if (signature !== ref_sig || exp_q.size() != 0 ||
          n_capture - cap_before != int'(wl[w].n_vec) + 1) begin
        failures++;
        $display("%s: signature %h ref %h, %0d vectors unchecked, %0d captures",
                 wl[w].name, signature, ref_sig, exp_q.size(), n_capture - cap_before);
      end
      orig = longint'(wl[w].n_cells) * wl[w].n_vec;
      $display("%-7s N=%0d T=%0d L=%0d: %0d slices + %0d flips = %0d codes, %0d bits vs %0d (%0.1f%% compression; I=%0d)",
               wl[w].name, wl[w].n_cells, wl[w].n_vec, L, slices, flips, codes, codes * I, orig,
               100.0 * (1.0 - real'(codes * I) / real'(orig)), I);
    end
    $display("I=%0d mechanisms: flip=%0d prev=%0d zero=%0d one=%0d capture=%0d ignored-template=%0d vectors-checked=%0d ora-shifts=%0d",
             I, n_flip, n_tpl[0], n_tpl[1], n_tpl[2], n_capture, n_junk_tpl, n_cap_checked, n_ora_shift);
    checks++;
    if (n_flip == 0 || n_tpl[0] == 0 || n_tpl[1] == 0 || n_tpl[2] == 0 || n_capture == 0 ||
        n_junk_tpl == 0 || n_cap_checked == 0 || n_ora_shift == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    done = 1'b1;
  end
endmodule

// tb_ttbc_top: end-to-end test of the TTBC test architecture at its default
// size (5 channels, 29 scan chains).
//
// For each of six benchmark-sized workloads (scan cells N, vectors T and
// care-bit density D of the ISCAS'89 MINTEST test sets) the bench generates
// random test cubes with density D, encodes them with the two-slice
// look-ahead template heuristic (try each template for the current slice,
// add the cheapest way to reach the next slice, keep the minimum), and
// streams the codes into the design as a tester would. A behavioural model
// of a core with 29 scan chains of length L = ceil(N/29) shifts when scan_en
// is high and, on capture, checks every care bit of the loaded vector and
// replaces the chain contents with a response. The bench also checks:
//  - capture happens exactly in the slot after each vector's last slice is
//    shifted, and the channel value in that slot is ignored;
//  - scan_en is high exactly for template codes outside that slot;
//  - the cycle count per vector set equals slices + flips + one capture slot
//    per vector;
//  - the MISR signature equals a reference compaction of the responses.
// It prints the compressed data volume next to the uncompressed one and the
// analytic estimate (which it must not exceed), and checks that its encoder makes the worked example's
// template choice. Every
// mechanism (flip, each of the three templates, capture, ignored slot
// holding a template code, compactor shifting) must occur at least once.
module tb_ttbc_top;
  import ttbc_pkg::*;

  localparam int unsigned I    = 5;
  localparam int unsigned S    = 29;
  localparam int unsigned CW   = 16;
  localparam int unsigned LMAX = 64;

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

  ttbc_top dut (
    .clk(clk), .rst_n(rst_n), .ch(ch), .slices_per_vector(spv),
    .scan_in(scan_in), .scan_en(scan_en), .capture(capture), .scan_out(scan_out),
    .signature(signature), .flip(flip), .slice_cnt(slice_cnt), .vector_cnt(vector_cnt));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
        ref_sig <= {ref_sig[S-2:0], ref_sig[28] ^ ref_sig[26]} ^ scan_out;
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
    rst_n = 1'b0;
    ch = '0;
    spv = 16'd1;
    for (int c = 0; c < S; c++) chain[c] = '0;
    // The encoder must make the worked example's choice: with slice 2 built
    // from all 1, slice 3 (bits 0,3 = 1, bit 2 = 0) takes all 0, because
    // slice 4 (bits 0,3 = 1, bits 1,4 = 0) then needs no flip.
    checks++;
    if (choose('1, slice_t'(5'b01101), slice_t'(5'b01001),
               slice_t'(5'b11011), slice_t'(5'b01001)) != TPL_ZERO) begin
      failures++;
      $display("encoder does not reproduce the worked example");
    end
    foreach (wl[w]) begin
      cube_t cur, nxt;
      slice_t prev, nm, nv, base, fl;
      template_e t;
      int codes, flips, slices, vec_before_cycles, cap_before;
      longint orig;
      real est;
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
      // Analytic size with only the all-0/all-1 templates and evenly split
      // care bits: I*(N/S)*T + I*D*N*T/2.
      // The previous-slice template and the look-ahead can only do better.
      est = real'(I) * real'(wl[w].n_cells) / real'(S) * real'(wl[w].n_vec) +
            real'(I) * real'(wl[w].dens_pm) / 1000.0 * real'(orig) / 2.0;
      $display("%-7s analytic estimate I*(N/S)*T + I*D*N*T/2 = %0.0f bits", wl[w].name, est);
      checks++;
      if (real'(codes * I) > est) begin
        failures++;
        $display("%s: %0d bits exceed the analytic estimate", wl[w].name, codes * I);
      end
      $display("%-7s N=%0d T=%0d L=%0d: %0d slices + %0d flips = %0d codes, %0d bits vs %0d (%0.1f%% compression; MINTEST set at I=5: %0d bits)",
               wl[w].name, wl[w].n_cells, wl[w].n_vec, L, slices, flips, codes, codes * I, orig,
               100.0 * (1.0 - real'(codes * I) / real'(orig)), wl[w].paper_bits);
    end
    $display("mechanisms: flip=%0d prev=%0d zero=%0d one=%0d capture=%0d ignored-template=%0d vectors-checked=%0d ora-shifts=%0d",
             n_flip, n_tpl[0], n_tpl[1], n_tpl[2], n_capture, n_junk_tpl, n_cap_checked, n_ora_shift);
    checks++;
    if (n_flip == 0 || n_tpl[0] == 0 || n_tpl[1] == 0 || n_tpl[2] == 0 || n_capture == 0 ||
        n_junk_tpl == 0 || n_cap_checked == 0 || n_ora_shift == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ttbc_capture_ctrl: drives random SCE pulses (never during capture, as
// the decoder guarantees) and checks against an independent count that
// capture rises exactly one cycle after every slices_per_vector-th counted
// SCE, that the first SCE after reset is not counted, that ora_en follows
// the first capture, and the slice and vector counters. Runs several
// slices_per_vector settings including 1.
module tb_ttbc_capture_ctrl;
  localparam int unsigned CW = 16;
  logic clk = 1'b0;
  logic rst_n;
  logic sce;
  logic [CW-1:0] spv;
  logic capture, ora_en;
  logic [CW-1:0] slice_cnt;
  logic [31:0] vector_cnt;
  int checks = 0, failures = 0;

  ttbc_capture_ctrl #(.CW(CW)) dut (
    .clk(clk), .rst_n(rst_n), .sce(sce), .slices_per_vector(spv),
    .capture(capture), .ora_en(ora_en), .slice_cnt(slice_cnt), .vector_cnt(vector_cnt));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int settings [4] = '{5, 1, 58, 3};

  initial begin
    int nsce, ncap;
    logic exp_cap, exp_ora;
    int exp_vec;
    sce = 1'b0;
    foreach (settings[s]) begin
      spv = CW'(settings[s]);
      rst_n = 1'b0;
      @(negedge clk) rst_n = 1'b1;
      nsce = 0; ncap = 0; exp_cap = 1'b0; exp_ora = 1'b0; exp_vec = 0;
      repeat (2000) begin
        sce = !capture && ($urandom % 3 != 0);
        @(posedge clk); #1;
        // reference
        if (exp_cap) begin exp_ora = 1'b1; exp_vec++; end
        exp_cap = 1'b0;
        if (sce) begin
          nsce++;
          if (nsce > 1 && (nsce - 1) % settings[s] == 0) exp_cap = 1'b1;
        end
        checks++;
        if (capture !== exp_cap || ora_en !== exp_ora || vector_cnt != 32'(exp_vec) ||
            slice_cnt != CW'(nsce == 0 ? 0 : (nsce - 1) % settings[s])) begin
          failures++;
          $display("spv=%0d nsce=%0d cap=%b/%b ora=%b/%b vec=%0d/%0d cnt=%0d",
                   settings[s], nsce, capture, exp_cap, ora_en, exp_ora, vector_cnt, exp_vec, slice_cnt);
        end
        if (capture) ncap++;
        @(negedge clk);
      end
      checks++;
      if (ncap == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ttbc_decoder: checks the TTBC decoder in two configurations.
//  1. I=3, S=5: the five-slice worked example of the method. The code stream
//     110 111 110 000 011 101 110 101 (all 0; all 1; all 0 then flip bits 0
//     and 3; previous; all 0; one more template to shift the last slice)
//     must shift the slices 00000 11111 01001 01001 00000 after the
//     power-up slice, in 8 cycles with SCE high on the 6 template codes.
//  2. I=5, S=29 (defaults): random codes, including hold cycles, against a
//     bit-level reference model, checking slice, sce and flip every cycle.
module tb_ttbc_decoder;
  import ttbc_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- small example decoder --------------------------------
  logic [2:0] ch3;
  logic [4:0] slice3;
  logic sce3, flip3;
  ttbc_decoder #(.I(3), .S(5)) dut3 (
    .clk(clk), .rst_n(rst_n), .hold(1'b0), .ch(ch3),
    .slice(slice3), .sce(sce3), .flip(flip3));

  // ---------------- default decoder ---------------------------------------
  localparam int unsigned I = 5;
  localparam int unsigned S = 29;
  logic [I-1:0] ch;
  logic hold;
  logic [S-1:0] slice;
  logic sce, flip;
  ttbc_decoder dut (
    .clk(clk), .rst_n(rst_n), .hold(hold), .ch(ch),
    .slice(slice), .sce(sce), .flip(flip));

  logic [2:0] ex_codes [8] = '{3'b110, 3'b111, 3'b110, 3'b000, 3'b011, 3'b101, 3'b110, 3'b101};
  logic [4:0] ex_shift [6] = '{5'b00000, 5'b00000, 5'b11111, 5'b01001, 5'b01001, 5'b00000};

  int n_flip = 0, n_prev = 0, n_zero = 0, n_one = 0, n_hold = 0;

  initial begin
    int nshift;
    logic [S-1:0] model;
    logic exp_sce, exp_flip;
    rst_n = 1'b0; ch3 = '0; ch = '0; hold = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Part 1: worked example.
    nshift = 0;
    for (int k = 0; k < 8; k++) begin
      ch3 = ex_codes[k];
      #1;
      checks++;
      if (sce3 !== (ex_codes[k] >= 3'd5) || flip3 !== (ex_codes[k] < 3'd5)) begin
        failures++;
        $display("example: code %b sce=%b flip=%b", ex_codes[k], sce3, flip3);
      end
      if (sce3) begin
        checks++;
        if (nshift > 5 || slice3 !== ex_shift[nshift]) begin
          failures++;
          $display("example: shift %0d got %b", nshift, slice3);
        end
        nshift++;
      end
      @(negedge clk);
    end
    checks++;
    if (nshift != 6) begin failures++; $display("example: %0d shifts", nshift); end

    // Part 2: random stream on the default decoder.
    model = '0;
    rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    repeat (4000) begin
      hold = ($urandom % 16) == 0;
      ch   = I'($urandom);
      #1;
      exp_sce  = !hold && (ch >= I'(S));
      exp_flip = !hold && (ch < I'(S));
      checks++;
      if (sce !== exp_sce || flip !== exp_flip || slice !== model) begin
        failures++;
        $display("random: ch=%0d hold=%b sce=%b flip=%b slice=%h model=%h",
                 ch, hold, sce, flip, slice, model);
      end
      if (hold) n_hold++;
      else if (ch < I'(S)) begin model[ch] = ~model[ch]; n_flip++; end
      else if (ch == I'(template_code(I, TPL_PREV))) n_prev++;
      else if (ch == I'(template_code(I, TPL_ZERO))) begin model = '0; n_zero++; end
      else begin model = '1; n_one++; end
      @(negedge clk);
    end
    checks++;
    if (n_flip == 0 || n_prev == 0 || n_zero == 0 || n_one == 0 || n_hold == 0) failures++;
    $display("modes: flip=%0d prev=%0d zero=%0d one=%0d hold=%0d", n_flip, n_prev, n_zero, n_one, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

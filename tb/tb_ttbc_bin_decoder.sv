// tb_ttbc_bin_decoder: applies every code of a 5-to-32 decoder with enable
// high and low and checks that exactly the addressed output is high (or
// none when disabled).
module tb_ttbc_bin_decoder;
  localparam int unsigned N = 5;
  logic en;
  logic [N-1:0] code;
  logic [(1<<N)-1:0] y;
  int checks = 0, failures = 0;

  ttbc_bin_decoder #(.N(N)) dut (.en(en), .code(code), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int c = 0; c < (1 << N); c++) begin
        en = e[0];
        code = N'(c);
        #1;
        for (int k = 0; k < (1 << N); k++) begin
          checks++;
          if (y[k] !== ((e == 1) && (k == c))) begin
            failures++;
            $display("mismatch en=%0d code=%0d y[%0d]=%b", e, c, k, y[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ttbc_tff: exercises the T flip-flop with random T/SET/RESET sequences
// and compares q against the characteristic table (set, reset, hold,
// toggle), checking every cycle. Includes a watchdog.
module tb_ttbc_tff;
  logic clk = 1'b0;
  logic rst_n;
  logic t, set, rst, q;
  logic model;
  int checks = 0, failures = 0;
  int n_set = 0, n_rst = 0, n_hold = 0, n_tog = 0;

  ttbc_tff dut (.clk(clk), .rst_n(rst_n), .t(t), .set(set), .rst(rst), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; t = 1'b0; set = 1'b0; rst = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    model = 1'b0;
    checks++; if (q !== 1'b0) failures++;
    repeat (1000) begin
      @(negedge clk);
      t = 1'($urandom);
      case ($urandom % 4)
        0: begin set = 1'b1; rst = 1'b0; end
        1: begin set = 1'b0; rst = 1'b1; end
        default: begin set = 1'b0; rst = 1'b0; end
      endcase
      if (set)      begin model = 1'b1;   n_set++;  end
      else if (rst) begin model = 1'b0;   n_rst++;  end
      else if (t)   begin model = ~model; n_tog++;  end
      else          n_hold++;
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("mismatch: t=%b set=%b rst=%b q=%b expected %b", t, set, rst, q, model);
      end
    end
    checks++;
    if (n_set == 0 || n_rst == 0 || n_hold == 0 || n_tog == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ttbc_misr: feeds random words into a 29-bit MISR with random enables
// and compares every cycle with a reference built from the polynomial
// x^29 + x^27 + 1 written out bit by bit here; also checks that a single
// flipped input bit changes the final signature.
module tb_ttbc_misr;
  localparam int unsigned W = 29;
  logic clk = 1'b0;
  logic rst_n, en;
  logic [W-1:0] d, sig;
  int checks = 0, failures = 0;

  ttbc_misr #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .sig(sig));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] step(logic [W-1:0] s, logic [W-1:0] din);
    logic fb;
    fb = s[28] ^ s[26];
    return {s[27:0], fb} ^ din;
  endfunction

  logic [W-1:0] stim [500];
  logic         ens  [500];

  task automatic run(input int flip_at, output logic [W-1:0] final_sig);
    logic [W-1:0] model;
    rst_n = 1'b0; en = 1'b0; d = '0;
    @(negedge clk) rst_n = 1'b1;
    model = '0;
    checks++; if (sig !== '0) failures++;
    for (int k = 0; k < 500; k++) begin
      en = ens[k];
      d  = stim[k] ^ ((k == flip_at) ? W'(1) : W'(0));
      @(posedge clk); #1;
      if (en) model = step(model, d);
      checks++;
      if (sig !== model) begin
        failures++;
        $display("cycle %0d: sig=%h model=%h", k, sig, model);
      end
      @(negedge clk);
    end
    final_sig = sig;
  endtask

  initial begin
    logic [W-1:0] s0, s1;
    for (int k = 0; k < 500; k++) begin
      stim[k] = W'({$urandom, $urandom});
      ens[k]  = ($urandom % 4) != 0;
    end
    ens[100] = 1'b1;
    run(-1, s0);
    run(100, s1);
    checks++;
    if (s0 == s1) begin failures++; $display("single-bit error not detected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

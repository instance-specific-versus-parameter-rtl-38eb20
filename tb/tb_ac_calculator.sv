// tb_ac_calculator: four terms per cycle; random function-value pairs,
// random term enables, idle cycles and restarts, sum checked against a
// running count of the enabled pairs where both values are 1.
module tb_ac_calculator;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, valid = 0, clear = 0;
  logic [3:0] fa = '0, fb = '0, en = '0;
  logic [7:0] sum;
  int model = 0;

  ac_calculator #(.TERMS(4), .SUM_W(8)) dut (.clk, .rst_n, .valid, .clear, .en, .fa, .fb, .sum);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      valid = ($urandom_range(3) != 0);
      clear = ($urandom_range(15) == 0);
      fa = 4'($urandom);
      fb = 4'($urandom);
      en = ($urandom_range(1) == 1) ? 4'hf : 4'($urandom);
      if (valid) begin
        int n;
        n = 0;
        for (int k = 0; k < 4; k++) n += int'(fa[k] & fb[k] & en[k]);
        model = clear ? n : (model + n) % 256;
      end
      @(posedge clk); #1;
      checks++;
      if (int'(sum) != model) begin
        failures++;
        $display("FAIL t=%0d sum=%0d expected=%0d", t, sum, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

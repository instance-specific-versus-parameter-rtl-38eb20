// tb_u_generator: loads a base, advances over several batches and checks that
// the 64 values of every batch are base + k, including wrap-around at 2^32.
module tb_u_generator;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, advance = 0;
  logic [31:0] u_first = 0, u_base;
  logic [31:0] u_vals [64];
  longint unsigned expect_base;

  u_generator dut (.clk, .rst_n, .load, .u_first, .advance, .u_base, .u_vals);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_batch();
    checks++;
    if (u_base != 32'(expect_base)) begin
      failures++;
      $display("FAIL base=%h expected=%h", u_base, 32'(expect_base));
    end
    for (int k = 0; k < 64; k++) begin
      checks++;
      if (u_vals[k] != 32'(expect_base + longint'(k))) begin
        failures++;
        $display("FAIL k=%0d u=%h", k, u_vals[k]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    foreach (u_first[i]) ;
    for (int run = 0; run < 4; run++) begin
      expect_base = (run == 3) ? 64'hffff_ffa0 : longint'($urandom);
      @(negedge clk) begin u_first = 32'(expect_base); load = 1; end
      @(negedge clk) load = 0;
      check_batch();
      for (int b = 0; b < 5; b++) begin
        @(negedge clk) advance = 1;
        @(negedge clk) advance = 0;
        expect_base = (expect_base + 64) & 64'hffff_ffff;
        check_batch();
      end
      // no change without load or advance
      repeat (3) @(negedge clk);
      check_batch();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

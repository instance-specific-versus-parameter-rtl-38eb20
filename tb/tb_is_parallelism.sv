// tb_is_parallelism: the parallelism sweep of the instance-specific engine on
// xor5. Engines with 2, 10, 20, 30, 32 and 64 function components (1, 5, 10,
// 15, 16 and 32 summation terms per cycle) each compute the whole transform;
// values and cycle counts are checked, and the cycle counts printed show how
// the run length falls with the number of components.
module tb_is_parallelism;
  localparam int NCONF = 6;
  localparam int TERMS_OF [NCONF] = '{1, 5, 10, 15, 16, 32};
  logic clk = 0, rst_n = 0;
  logic fin [NCONF];
  int   c [NCONF], f [NCONF], cyc [NCONF];

  for (genvar i = 0; i < NCONF; i++) begin : g_conf
    is_par_run #(.TERMS(TERMS_OF[i])) u_run (
      .clk, .rst_n, .finished(fin[i]), .checks(c[i]), .failures(f[i]), .cycles(cyc[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    int checks, failures;
    bit all_done;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int i = 0; i < NCONF; i++) if (!fin[i]) all_done = 0;
    end while (!all_done);
    checks = 0; failures = 0;
    for (int i = 0; i < NCONF; i++) begin
      $display("function components %0d: %0d cycles from start to done for all 32 coefficients", 2 * TERMS_OF[i], cyc[i]);
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

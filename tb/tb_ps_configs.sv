// tb_ps_configs: the parameter-specific engine in each cube-width and
// parallelism combination of the original space-usage study: (32,64),
// (26,64), (21,64), (15,64), (10,64), (32,32), (10,32) and (32,1). All eight
// run side by side, each on its own SRAM, and must produce correct
// coefficients with the expected run length.
module tb_ps_configs;
  logic clk = 0, rst_n = 0;
  localparam int N = 8;
  logic fin [N];
  int   c [N], f [N];

  ps_config_run #(.CB(32), .NP(64)) u0 (.clk, .rst_n, .finished(fin[0]), .checks(c[0]), .failures(f[0]));
  ps_config_run #(.CB(26), .NP(64)) u1 (.clk, .rst_n, .finished(fin[1]), .checks(c[1]), .failures(f[1]));
  ps_config_run #(.CB(21), .NP(64)) u2 (.clk, .rst_n, .finished(fin[2]), .checks(c[2]), .failures(f[2]));
  ps_config_run #(.CB(15), .NP(64)) u3 (.clk, .rst_n, .finished(fin[3]), .checks(c[3]), .failures(f[3]));
  ps_config_run #(.CB(10), .NP(64)) u4 (.clk, .rst_n, .finished(fin[4]), .checks(c[4]), .failures(f[4]));
  ps_config_run #(.CB(32), .NP(32)) u5 (.clk, .rst_n, .finished(fin[5]), .checks(c[5]), .failures(f[5]));
  ps_config_run #(.CB(10), .NP(32)) u6 (.clk, .rst_n, .finished(fin[6]), .checks(c[6]), .failures(f[6]));
  ps_config_run #(.CB(32), .NP(1))  u7 (.clk, .rst_n, .finished(fin[7]), .checks(c[7]), .failures(f[7]));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
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
      for (int i = 0; i < N; i++) if (!fin[i]) all_done = 0;
    end while (!all_done);
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_is_accelerator: runs the whole instance-specific transform twice per
// instance: the default (xor5, two function components) and the 3-input
// function f = x0 ? x2 : !x1 with three function pairs, so that the 8 input vectors of a u
// do not split evenly into groups. Every coefficient is compared with a
// brute-force sum over the truth table. The first run of each takes every
// coefficient at once: done must rise 2^n*ceil(2^n/TERMS) + 2 clock edges
// after the edge that samples start (that many issue cycles, one to capture
// the last sum, one for the host to take it); the second
// run stalls the host side at random and must still produce the same values.
module tb_is_accelerator;
  import ac_pkg::*;
  int checks = 0, failures = 0, stalls = 0;
  logic clk = 0, rst_n = 0;

  localparam bdd_node_t MUX3_BDD [3] = '{
    '{var_idx: 32'd2, lo: 32'd0, hi: 32'd1},
    '{var_idx: 32'd1, lo: 32'd1, hi: 32'd0},
    '{var_idx: 32'd0, lo: 32'd3, hi: 32'd2}
  };

  // default instance
  logic       s5 = 0, busy5, done5, v5, r5 = 1;
  logic [4:0] u5;
  logic [5:0] b5;
  is_accelerator dut5 (.clk, .rst_n, .start(s5), .busy(busy5), .done(done5),
                       .coef_valid(v5), .coef_ready(r5), .coef_u(u5), .coef_value(b5));

  // f = x0 ? x2 : !x1, 3 summation terms per cycle
  logic       s3 = 0, busy3, done3, v3, r3 = 1;
  logic [2:0] u3;
  logic [3:0] b3;
  is_accelerator #(.N_VARS(3), .N_NODES(3), .NODES(MUX3_BDD), .TERMS(3)) dut3 (
    .clk, .rst_n, .start(s3), .busy(busy3), .done(done3),
    .coef_valid(v3), .coef_ready(r3), .coef_u(u3), .coef_value(b3));

  always #5 clk = ~clk;

  function automatic bit f5(int v); return ^5'(v); endfunction
  function automatic bit f3(int v); return v[0] ? v[2] : !v[1]; endfunction

  function automatic int ref5(int u);
    int s = 0;
    for (int v = 0; v < 32; v++) s += int'(f5(v) & f5(v ^ u));
    return s;
  endfunction
  function automatic int ref3(int u);
    int s = 0;
    for (int v = 0; v < 8; v++) s += int'(f3(v) & f3(v ^ u));
    return s;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one instance; 'which' selects the engine.
  task automatic run(int which, bit random_stall);
    int next_u = 0, cycles = 0, n = (which == 5) ? 5 : 3, terms = (which == 5) ? 1 : 3;
    bit finished = 0;
    @(negedge clk);
    if (which == 5) s5 = 1; else s3 = 1;
    @(negedge clk);
    if (which == 5) s5 = 0; else s3 = 0;
    cycles = 1;
    while (!finished) begin
      bit rdy = random_stall ? ($urandom_range(2) == 0) : 1'b1;
      if (which == 5) r5 = rdy; else r3 = rdy;
      @(posedge clk);
      if (which == 5 ? (v5 && r5) : (v3 && r3)) begin
        int u   = (which == 5) ? int'(u5) : int'(u3);
        int val = (which == 5) ? int'(b5) : int'(b3);
        int exp = (which == 5) ? ref5(u) : ref3(u);
        checks++;
        if (u != next_u || val != exp) begin
          failures++;
          $display("FAIL inst=%0d u=%0d (expected u=%0d) B=%0d expected=%0d", which, u, next_u, val, exp);
        end
        next_u++;
      end else if (which == 5 ? (v5 && !r5) : (v3 && !r3)) stalls++;
      if (which == 5 ? done5 : done3) finished = 1;
      @(negedge clk);
      if (!finished) cycles++;
    end
    checks++;
    if (next_u != (1 << n)) begin
      failures++;
      $display("FAIL inst=%0d got %0d coefficients", which, next_u);
    end
    if (!random_stall) begin
      // 'cycles' also counts the period in which start is driven, hence + 3.
      checks++;
      if (cycles != (1 << n) * (((1 << n) + terms - 1) / terms) + 3) begin
        failures++;
        $display("FAIL inst=%0d took %0d cycles, expected %0d", which, cycles, (1 << n) * (((1 << n) + terms - 1) / terms) + 3);
      end
    end
    if (which == 5) r5 = 1; else r3 = 1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(5, 0);
    run(5, 1);
    run(3, 0);
    run(3, 1);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no host stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

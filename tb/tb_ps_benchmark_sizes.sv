// tb_ps_benchmark_sizes: the parameter-specific engine at its default size
// (32-bit cubes, 64 coefficients in parallel) on functions with the input and
// cube counts of two benchmarks of the original study, as random minterm
// lists (the benchmark functions themselves are not reproduced):
//   - 10 inputs, 837 cubes (the size of sym10): all 1024 coefficients;
//   - 16 inputs, 112 cubes (the size of ryy6): all 65536 coefficients.
// Each coefficient is compared with an exact count over the minterm set
// (is m xor u in the set, for every m), and the run length with
// 2N + batches*(N(N+1) + 65). The projected time at 26 MHz is printed.
module tb_ps_benchmark_sizes;
  localparam int DW = 70, AW = 21;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [19:0]   n_cubes = '0;
  logic [31:0]   u_first = '0;
  logic [14:0]   n_batches = '0;
  logic          sram_en, sram_we;
  logic [AW-1:0] sram_addr;
  logic [DW-1:0] sram_wdata, sram_rdata;

  ps_accelerator dut (
    .clk, .rst_n, .start, .n_cubes, .u_first, .n_batches, .busy, .done,
    .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata);

  sram_model #(.AW(AW), .DW(DW)) u_sram (
    .clk, .en(sram_en), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (40_000_000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic run(input int n, input int nc, input int nb, input int total_batches);
    bit in_set [int unsigned];
    int unsigned ms[$];
    longint cycles = 0, expect_cycles;
    while (ms.size() < nc) begin
      int unsigned m = $urandom_range((1 << n) - 1);
      if (!in_set.exists(m)) begin in_set[m] = 1; ms.push_back(m); end
    end
    u_sram.clear_all();
    foreach (ms[i]) u_sram.poke(AW'(i), {6'd0, 32'd0, 32'(ms[i])});
    @(negedge clk);
    n_cubes = 20'(nc); u_first = 0; n_batches = 15'(nb); start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    expect_cycles = 2 * nc + longint'(nb) * (longint'(nc) * (nc + 1) + 65) + 2;
    checks++;
    if (cycles != expect_cycles) begin
      failures++;
      $display("FAIL %0d inputs, %0d cubes: %0d cycles, expected %0d", n, nc, cycles, expect_cycles);
    end
    for (int r = 0; r < nb * 64; r++) begin
      longint unsigned got = longint'(u_sram.peek(AW'((1 << 20) + r)));
      longint unsigned want = 0;
      foreach (ms[i]) if (in_set.exists(ms[i] ^ r)) want++;
      checks++;
      if (got != want) begin
        failures++;
        if (failures < 10) $display("FAIL %0d inputs u=%0d B=%0d expected %0d", n, r, got, want);
      end
    end
    $display("%0d inputs, %0d cubes: %0d batches in %0d cycles; all %0d batches would take %0d cycles, %.3f s at 26 MHz",
             n, nc, nb, cycles, total_batches,
             2 * nc + longint'(total_batches) * (longint'(nc) * (nc + 1) + 65),
             real'(2 * nc + longint'(total_batches) * (longint'(nc) * (nc + 1) + 65)) / 26.0e6);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(10, 837, 16, 16);
    run(16, 112, 1024, 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

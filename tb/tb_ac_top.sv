// tb_ac_top: end-to-end test of both engines at their default sizes, running
// at the same time. The instance-specific engine streams the 32 coefficients
// of xor5 while the host side stalls at random. The parameter-specific engine
// computes xor5 from its 16-minterm cube list (one batch of 64 u values), and
// then a random 7-input function given as a disjoint cube list with
// don't-cares (two batches). Results are compared with the exact
// autocorrelation, with the cube-list procedure, and xor5 between engines.
// Mechanisms counted and required at least once: host stall, don't-care
// write-back, batch advance, a commit of weight above 1, several u values
// hit by one cube read.
module tb_ac_top;
  import ac_pkg::*;
  import ac_tb_pkg::*;
  localparam int DW = 70, AW = 21;

  int checks = 0, failures = 0;
  int n_stall = 0, n_dc_wb = 0, n_advance = 0, n_weighted = 0, n_multi_hit = 0;
  logic clk = 0, rst_n = 0;

  logic        is_start = 0, is_busy, is_done, is_coef_valid, is_coef_ready = 1;
  logic [4:0]  is_coef_u;
  logic [5:0]  is_coef_value;
  logic        ps_start = 0, ps_busy, ps_done;
  logic [19:0] ps_n_cubes = '0;
  logic [31:0] ps_u_first = '0;
  logic [14:0] ps_n_batches = '0;
  logic          sram_en, sram_we;
  logic [AW-1:0] sram_addr;
  logic [DW-1:0] sram_wdata, sram_rdata;

  ac_top dut (.*);

  sram_model #(.AW(AW), .DW(DW)) u_sram (
    .clk, .en(sram_en), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (is_coef_valid && !is_coef_ready) n_stall++;
    if (sram_we && !dut.u_ps.wr_result) n_dc_wb++;
    if (dut.u_ps.u_advance) n_advance++;
    if (dut.u_ps.rd_last && dut.u_ps.dc_q != 0 && dut.u_ps.u_contrib.found_now != 0) n_weighted++;
    if (dut.u_ps.rd_cmp && $countones(dut.u_ps.hit) > 1) n_multi_hit++;
  end

  int is_result [32];

  // host of the instance-specific engine
  task automatic is_host();
    int next_u = 0;
    @(negedge clk) is_start = 1;
    @(negedge clk) is_start = 0;
    while (!is_done) begin
      is_coef_ready = ($urandom_range(3) != 0);
      @(posedge clk);
      if (is_coef_valid && is_coef_ready) begin
        is_result[is_coef_u] = int'(is_coef_value);
        checks++;
        if (int'(is_coef_u) != next_u) begin failures++; $display("FAIL IS order u=%0d", is_coef_u); end
        next_u++;
      end
      @(negedge clk);
    end
    is_coef_ready = 1;
    checks++;
    if (next_u != 32) begin failures++; $display("FAIL IS gave %0d coefficients", next_u); end
  endtask

  // host of the parameter-specific engine
  task automatic ps_run(ref cube_t cl[$], input int n, input int nb, output longint unsigned res[$]);
    u_sram.clear_all();
    foreach (cl[i]) u_sram.poke(AW'(i), {6'd0, 32'(cl[i].dc), 32'(cl[i].val)});
    @(negedge clk);
    ps_n_cubes = 20'(cl.size()); ps_u_first = 0; ps_n_batches = 15'(nb); ps_start = 1;
    @(negedge clk) ps_start = 0;
    while (!ps_done) @(negedge clk);
    res.delete();
    for (int r = 0; r < nb * 64; r++) res.push_back(longint'(u_sram.peek(AW'((1 << 20) + r))));
  endtask

  initial begin
    cube_t xl[$], rl[$];
    longint unsigned res[$];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < 32; m++)
      if (^5'(m)) begin cube_t c; c.val = m; c.dc = 0; xl.push_back(c); end

    fork
      is_host();
      ps_run(xl, 5, 1, res);
    join

    for (int u = 0; u < 64; u++) begin
      longint unsigned want;
      want = ac_exact(xl, 5, u);   // 0 for u >= 32
      checks++;
      if (res[u] != want) begin failures++; $display("FAIL PS xor5 u=%0d B=%0d expected %0d", u, res[u], want); end
      if (u < 32) begin
        checks++;
        if (longint'(is_result[u]) != want) begin
          failures++; $display("FAIL IS xor5 u=%0d B=%0d expected %0d", u, is_result[u], want);
        end
      end
    end

    // random 7-input function with don't-care cubes, two batches
    do gen_cubes(7, 20, 40, rl); while (rl.size() < 6);
    ps_run(rl, 7, 2, res);
    for (int u = 0; u < 128; u++) begin
      checks++;
      if (res[u] != ac_procedure(rl, u)) begin
        failures++; $display("FAIL PS random u=%0d B=%0d expected %0d", u, res[u], ac_procedure(rl, u));
      end
    end

    $display("mechanisms: host stalls %0d, dc write-backs %0d, batch advances %0d, weighted commits %0d, multi-hit reads %0d",
             n_stall, n_dc_wb, n_advance, n_weighted, n_multi_hit);
    checks += 5;
    if (n_stall == 0)     begin failures++; $display("FAIL no host stall"); end
    if (n_dc_wb == 0)     begin failures++; $display("FAIL no don't-care write-back"); end
    if (n_advance == 0)   begin failures++; $display("FAIL no batch advance"); end
    if (n_weighted == 0)  begin failures++; $display("FAIL no weighted commit"); end
    if (n_multi_hit == 0) begin failures++; $display("FAIL no parallel hits"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

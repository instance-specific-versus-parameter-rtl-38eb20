// tb_ps_accelerator: the parameter-specific engine at reduced size (8-input
// cube words, 8 coefficients in parallel, up to 64 cubes) with a behavioural
// SRAM. Acting as host, it writes a cube list, starts a run and reads back the
// results, which are compared with
//   - the cube-list procedure evaluated minterm by minterm (every run), and
//   - the exact autocorrelation from the truth table (minterm lists, where the
//     procedure is exact).
// It also checks the don't-care counts written back beside each cube, the run
// length 2N + batches*(N(N+1) + 1 + N_PAR) cycles and the SRAM access counts.
module tb_ps_accelerator;
  import ac_tb_pkg::*;
  localparam int CB = 8, NP = 8, MCL = 6, RL = 8;
  localparam int DCW = 4, DW = 2 * CB + DCW, AW = RL + 1, NBW = RL - 3 + 1;

  int checks = 0, failures = 0;
  int weighted = 0;     // commits with weight above 1 seen in the references
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [MCL:0]    n_cubes = '0;
  logic [CB-1:0]   u_first = '0;
  logic [NBW-1:0]  n_batches = '0;
  logic            sram_en, sram_we;
  logic [AW-1:0]   sram_addr;
  logic [DW-1:0]   sram_wdata, sram_rdata;

  ps_accelerator #(.CUBE_BITS(CB), .N_PAR(NP), .MAX_CUBES_LOG2(MCL), .RESULT_LOG2(RL)) dut (
    .clk, .rst_n, .start, .n_cubes, .u_first, .n_batches, .busy, .done,
    .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata
  );

  sram_model #(.AW(AW), .DW(DW)) u_sram (
    .clk, .en(sram_en), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(ref cube_t cl[$], input int n, input int uf, input int nb, input bit exact);
    int cycles = 0, reads0, writes0, nc = cl.size();
    u_sram.clear_all();
    foreach (cl[i]) u_sram.poke(AW'(i), {DCW'(4'hf), CB'(cl[i].dc), CB'(cl[i].val)});
    reads0  = u_sram.reads;
    writes0 = u_sram.writes;
    @(negedge clk);
    n_cubes = (MCL + 1)'(nc); u_first = CB'(uf); n_batches = NBW'(nb); start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    // run length and SRAM traffic
    checks += 3;
    if (cycles != 2 * nc + nb * (nc * (nc + 1) + 1 + NP) + 2) begin
      failures++;
      $display("FAIL run took %0d cycles, expected %0d", cycles, 2 * nc + nb * (nc * (nc + 1) + 1 + NP) + 2);
    end
    if (int'(u_sram.reads) - reads0 != nc + nb * nc * (nc + 1)) begin
      failures++;
      $display("FAIL %0d reads", int'(u_sram.reads) - reads0);
    end
    if (int'(u_sram.writes) - writes0 != nc + nb * NP) begin
      failures++;
      $display("FAIL %0d writes", int'(u_sram.writes) - writes0);
    end
    // don't-care counts stored beside the cubes
    foreach (cl[i]) begin
      logic [DW-1:0] w = u_sram.peek(AW'(i));
      checks++;
      if (int'(w[DW-1:2*CB]) != $countones(cl[i].dc) || w[2*CB-1:0] != {CB'(cl[i].dc), CB'(cl[i].val)}) begin
        failures++;
        $display("FAIL cube %0d word %h", i, w);
      end
      if (cl[i].dc != 0) weighted++;
    end
    // coefficients
    for (int r = 0; r < nb * NP; r++) begin
      longint unsigned u = longint'((uf + r) % (1 << CB));
      longint unsigned got = longint'(u_sram.peek(AW'((1 << RL) + r)));
      longint unsigned want = ac_procedure(cl, u);
      checks++;
      if (got != want) begin
        failures++;
        if (failures < 20) $display("FAIL u=%0d B=%0d expected %0d", u, got, want);
      end
      if (exact) begin
        checks++;
        if (got != ac_exact(cl, n, u)) begin
          failures++;
          if (failures < 20) $display("FAIL u=%0d B=%0d exact %0d", u, got, ac_exact(cl, n, u));
        end
      end
    end
  endtask

  initial begin
    cube_t cl[$];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // 1: minterm list of a random 5-input function, all 32 coefficients
    cl.delete();
    for (int m = 0; m < 32; m++)
      if ($urandom_range(1)) begin cube_t c; c.val = m; c.dc = 0; cl.push_back(c); end
    run(cl, 5, 0, 4, 1);
    // 2..4: random disjoint cube lists over 6 inputs, unaligned u ranges
    for (int t = 0; t < 3; t++) begin
      gen_cubes(6, 25, 64, cl);
      if (cl.size() == 0) begin cube_t c; c.val = 0; c.dc = 3; cl.push_back(c); end
      run(cl, 6, 5 + 17 * t, 3, 0);
    end
    // 5: a single cube, u range running past 2^6
    cl.delete();
    begin cube_t c; c.val = 6'b100001; c.dc = 6'b011010; cl.push_back(c); end
    run(cl, 6, 60, 1, 1);
    // 6: the universe cube: B(u) = 2^6 for all u
    begin cube_t c; cl.delete(); c.val = 0; c.dc = 6'h3f; cl.push_back(c); end
    run(cl, 6, 0, 2, 1);
    checks++;
    if (weighted == 0) begin failures++; $display("FAIL no cube with don't-cares exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

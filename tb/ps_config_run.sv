// ps_config_run: testbench helper. Runs a parameter-specific engine of the
// given cube width and parallelism, with its own behavioural SRAM, on
//   - the minterm list of a random 6-input function (checked against the
//     exact transform), and
//   - a random disjoint 6-input cube list with don't-cares (checked against
//     the cube-list procedure),
// 64 coefficients each, starting at u = 3, and checks the run length
// 2N + batches*(N(N+1) + 1 + N_PAR). Reports through its ports.
module ps_config_run
  import ac_tb_pkg::*;
#(
  parameter int unsigned CB = 32,
  parameter int unsigned NP = 64
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int DCW = $clog2(CB + 1), DW = 2 * CB + DCW, AW = 21;
  localparam int NBW = 20 - $clog2(NP) + 1;

  logic            start = 0, busy, done;
  logic [19:0]     n_cubes = '0;
  logic [CB-1:0]   u_first = '0;
  logic [NBW-1:0]  n_batches = '0;
  logic            sram_en, sram_we;
  logic [AW-1:0]   sram_addr;
  logic [DW-1:0]   sram_wdata, sram_rdata;

  ps_accelerator #(.CUBE_BITS(CB), .N_PAR(NP)) dut (
    .clk, .rst_n, .start, .n_cubes, .u_first, .n_batches, .busy, .done,
    .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata);

  sram_model #(.AW(AW), .DW(DW)) u_sram (
    .clk, .en(sram_en), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata));

  task automatic run(ref cube_t cl[$], input bit exact);
    int nb = (64 + NP - 1) / NP, nc = cl.size(), cycles = 0;
    u_sram.clear_all();
    foreach (cl[i]) u_sram.poke(AW'(i), DW'({CB'(cl[i].dc), CB'(cl[i].val)}));
    @(negedge clk);
    n_cubes = 20'(nc); u_first = CB'(3); n_batches = NBW'(nb); start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 2 * nc + nb * (nc * (nc + 1) + 1 + NP) + 2) begin
      failures++;
      $display("FAIL CB=%0d NP=%0d: %0d cycles", CB, NP, cycles);
    end
    for (int r = 0; r < 64; r++) begin
      longint unsigned got = longint'(u_sram.peek(AW'((1 << 20) + r)));
      longint unsigned want = exact ? ac_exact(cl, 6, longint'(3 + r)) : ac_procedure(cl, longint'(3 + r));
      checks++;
      if (got != want) begin
        failures++;
        $display("FAIL CB=%0d NP=%0d u=%0d B=%0d expected %0d", CB, NP, 3 + r, got, want);
      end
    end
  endtask

  initial begin
    cube_t cl[$];
    finished = 0; checks = 0; failures = 0;
    @(posedge rst_n);
    for (int m = 0; m < 64; m++)
      if ($urandom_range(3) == 0) begin cube_t c; c.val = m; c.dc = 0; cl.push_back(c); end
    if (cl.size() == 0) begin cube_t c; c.val = 0; c.dc = 0; cl.push_back(c); end
    run(cl, 1);
    do gen_cubes(6, 25, 24, cl); while (cl.size() == 0);
    run(cl, 0);
    finished = 1;
  end
endmodule

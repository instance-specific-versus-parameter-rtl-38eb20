// tb_contribution_registers: random scans of hits, commits with random
// don't-care counts and clears, checked against a reference of the
// accumulators (add 2^dc to every register hit at least once in the scan).
module tb_contribution_registers;
  localparam int NP = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, hit_valid = 0, commit = 0;
  logic [NP-1:0] hit = '0;
  logic [5:0]    dc = '0;
  logic [2:0]    rd_idx = '0;
  logic [32:0]   rd_data;
  longint unsigned model [NP];
  bit              found [NP];

  contribution_registers #(.N_PAR(NP)) dut (
    .clk, .rst_n, .clear, .hit_valid, .hit, .commit, .dc, .rd_idx, .rd_data
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int k = 0; k < NP; k++) begin
      rd_idx = 3'(k);
      #1;
      checks++;
      if (rd_data != 33'(model[k])) begin
        failures++;
        $display("FAIL k=%0d got=%0d expected=%0d", k, rd_data, model[k]);
      end
    end
  endtask

  initial begin
    foreach (model[k]) begin model[k] = 0; found[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int batch = 0; batch < 6; batch++) begin
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      foreach (model[k]) begin model[k] = 0; found[k] = 0; end
      for (int c = 0; c < 12; c++) begin
        int len = $urandom_range(1, 6);
        for (int j = 0; j < len; j++) begin
          @(negedge clk);
          hit_valid = 1;
          hit       = NP'($urandom) & NP'($urandom) & NP'($urandom);
          commit    = (j == len - 1);
          dc        = 6'($urandom_range(0, (batch == 5) ? 32 : 10));
          for (int k = 0; k < NP; k++) if (hit[k]) found[k] = 1;
          if (commit)
            for (int k = 0; k < NP; k++) begin
              if (found[k]) model[k] += 64'd1 << dc;
              found[k] = 0;
            end
        end
        @(negedge clk) begin hit_valid = 0; commit = 0; hit = '0; end
      end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

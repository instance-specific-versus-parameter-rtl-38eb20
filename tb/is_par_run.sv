// is_par_run: testbench helper. Runs the complete xor5 transform on an
// instance-specific engine with TERMS function pairs, the host always ready,
// and checks every coefficient against a truth-table sum and the run length
// 32*ceil(32/TERMS) + 2 cycles. Reports through its ports when finished.
module is_par_run #(
  parameter int unsigned TERMS = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cycles
);
  logic       start = 0, busy, done, coef_valid;
  logic [4:0] coef_u;
  logic [5:0] coef_value;

  is_accelerator #(.TERMS(TERMS)) dut (
    .clk, .rst_n, .start, .busy, .done, .coef_valid, .coef_ready(1'b1), .coef_u, .coef_value);

  function automatic int ref_b(int u);
    int s = 0;
    for (int v = 0; v < 32; v++) s += int'((^5'(v)) & (^5'(v ^ u)));
    return s;
  endfunction

  initial begin
    int next_u;
    finished = 0; checks = 0; failures = 0; cycles = 0; next_u = 0;
    @(posedge rst_n);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin
      @(posedge clk);
      if (coef_valid) begin
        checks++;
        if (int'(coef_u) != next_u || int'(coef_value) != ref_b(next_u)) begin
          failures++;
          $display("FAIL TERMS=%0d u=%0d B=%0d expected %0d", TERMS, coef_u, coef_value, ref_b(next_u));
        end
        next_u++;
      end
      @(negedge clk);
      if (!done) cycles++;
    end
    checks += 2;
    if (next_u != 32) begin failures++; $display("FAIL TERMS=%0d: %0d coefficients", TERMS, next_u); end
    // cycles = clock edges from the one that samples start to the one that raises done
    if (cycles != 32 * ((32 + TERMS - 1) / TERMS) + 2) begin
      failures++;
      $display("FAIL TERMS=%0d took %0d cycles", TERMS, cycles);
    end
    finished = 1;
  end
endmodule

// tb_comparator: drives the 64-cell comparator at its default size with
// random care/diff patterns and u values that match on the care bits about
// half of the time, and compares every hit bit with its definition.
module tb_comparator;
  int checks = 0, failures = 0, hits = 0;
  logic        en, compatible;
  logic [31:0] care, diff;
  logic [31:0] u_vals [64];
  logic [63:0] hit;

  comparator dut (.en, .compatible, .care, .diff, .u_vals, .hit);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      en         = ($urandom_range(7) != 0);
      compatible = ($urandom_range(7) != 0);
      care       = $urandom & $urandom;
      diff       = $urandom & care;
      for (int k = 0; k < 64; k++)
        u_vals[k] = $urandom_range(1) ? ((($urandom) & ~care) | diff) : $urandom;
      #1;
      for (int k = 0; k < 64; k++) begin
        bit model;
        model = en && compatible;
        for (int b = 0; b < 32; b++)
          if (care[b] && (u_vals[k][b] != diff[b])) model = 0;
        checks++;
        hits += int'(model);
        if (hit[k] != model) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d k=%0d hit=%0d model=%0d", t, k, hit[k], model);
        end
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL no hits exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

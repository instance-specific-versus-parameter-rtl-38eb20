// tb_cube_comparison: for random cube pairs c, d over 6 inputs and every u,
// the outputs of the cube comparison, completed with the per-u test, must say
// "c xor u lies in d" exactly when every minterm of c xor u is in d, checked
// by enumerating minterms. 'compatible' must equal "some u makes it fit".
module tb_cube_comparison;
  int checks = 0, failures = 0;
  logic [5:0] c_val, c_dc, d_val, d_dc, care, diff;
  logic compatible;

  cube_comparison #(.CUBE_BITS(6)) dut (.c_val, .c_dc, .d_val, .d_dc, .compatible, .care, .diff);

  function automatic bit inside_d(logic [5:0] cv, logic [5:0] cd, logic [5:0] dv, logic [5:0] dd, logic [5:0] u);
    for (int m = 0; m < 64; m++)
      if (((6'(m) ^ cv) & ~cd) == 0) begin             // m in c
        logic [5:0] s = 6'(m) ^ u;                       // minterm of c xor u
        if (((s ^ dv) & ~dd) != 0) return 0;
      end
    return 1;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      bit any_fit;
      any_fit = 0;
      c_val = 6'($urandom); c_dc = 6'($urandom) & 6'($urandom);
      d_val = 6'($urandom); d_dc = 6'($urandom);
      if (t % 4 == 0) d_dc = d_dc | c_dc;                // make fits common
      #1;
      for (int u = 0; u < 64; u++) begin
        bit model, got;
        model = inside_d(c_val, c_dc, d_val, d_dc, 6'(u));
        got   = compatible && (((6'(u) ^ diff) & care) == 0);
        any_fit |= model;
        checks++;
        if (model != got) begin
          failures++;
          if (failures < 10) $display("FAIL c=%b/%b d=%b/%b u=%b model=%0d", c_val, c_dc, d_val, d_dc, 6'(u), model);
        end
      end
      checks++;
      if (compatible != any_fit) begin
        failures++;
        $display("FAIL compatible=%0d expected=%0d", compatible, any_fit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

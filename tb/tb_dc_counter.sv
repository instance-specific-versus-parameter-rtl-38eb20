// tb_dc_counter: checks the don't-care counter at its default width (32) on
// corner masks and random masks against a bit-by-bit count.
module tb_dc_counter;
  int checks = 0, failures = 0;
  logic [31:0] mask;
  logic [5:0]  count;

  dc_counter dut (.dc_mask(mask), .count(count));

  function automatic int ref_count(logic [31:0] m);
    int c = 0;
    for (int i = 0; i < 32; i++) if (m[i]) c++;
    return c;
  endfunction

  task automatic check(logic [31:0] m);
    mask = m;
    #1;
    checks++;
    if (int'(count) != ref_count(m)) begin
      failures++;
      $display("FAIL mask=%h count=%0d expected=%0d", m, count, ref_count(m));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    check('1);
    check(32'h0000_ffff);
    check(32'hffff_0000);
    check(32'h8000_0001);
    for (int i = 0; i < 32; i++) check(32'd1 << i);
    for (int i = 0; i < 500; i++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

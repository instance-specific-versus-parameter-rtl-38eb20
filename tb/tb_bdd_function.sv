// tb_bdd_function: evaluates the function component exhaustively for the
// default instance (xor5, compared with the parity of the input) and for a
// second instance, the 3-input multiplexer f = x0 ? x2 : x1, given as its
// own BDD table.
module tb_bdd_function;
  import ac_pkg::*;
  int checks = 0, failures = 0;

  localparam bdd_node_t MUX3_BDD [3] = '{
    '{var_idx: 32'd2, lo: 32'd0, hi: 32'd1},  // id 2: x2
    '{var_idx: 32'd1, lo: 32'd0, hi: 32'd1},  // id 3: x1
    '{var_idx: 32'd0, lo: 32'd3, hi: 32'd2}   // id 4: x0 ? x2 : x1
  };

  logic [4:0] x5;
  logic [2:0] x3;
  logic       f5, f3;

  bdd_function dut_xor5 (.x(x5), .f(f5));
  bdd_function #(.N_VARS(3), .N_NODES(3), .NODES(MUX3_BDD)) dut_mux3 (.x(x3), .f(f3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      x5 = 5'(v);
      #1;
      checks++;
      if (f5 != ^x5) begin failures++; $display("FAIL xor5 x=%b f=%0d", x5, f5); end
    end
    for (int v = 0; v < 8; v++) begin
      x3 = 3'(v);
      #1;
      checks++;
      if (f3 != (x3[0] ? x3[2] : x3[1])) begin failures++; $display("FAIL mux3 x=%b f=%0d", x3, f3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

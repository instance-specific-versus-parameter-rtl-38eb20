// ac_calculator: the calculator of the instance-specific engine.
//
// Each cycle it receives TERMS pairs of function values, fa[k] = f(v_k) and
// fb[k] = f(v_k xor u), forms the products f(v_k) * f(v_k xor u) (an AND, since
// f is 0/1) and adds their count to the running sum for the current u. Pairs
// whose 'en' bit is 0 (past the end of the input space) add nothing.
//
// Interface: 'valid' marks a cycle that carries terms; 'clear' marks the first
// terms of a new u, which restart the sum instead of adding to it. 'sum' is a
// register and shows the total one cycle after the last terms of a u arrived.
// One summation term per function pair per cycle, as in the source paper; the
// restart-on-first-term that avoids a dead cycle between coefficients is this
// design's choice.
module ac_calculator #(
  parameter int unsigned TERMS = 1,  // summation terms per cycle (function pairs)
  parameter int unsigned SUM_W = 6   // wide enough for 2^n
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,
  input  logic             clear,
  input  logic [TERMS-1:0] en,
  input  logic [TERMS-1:0] fa,
  input  logic [TERMS-1:0] fb,
  output logic [SUM_W-1:0] sum
);

  logic [SUM_W-1:0] terms_now;

  always_comb begin
    terms_now = '0;
    for (int k = 0; k < TERMS; k++)
      terms_now += {{(SUM_W - 1){1'b0}}, fa[k] & fb[k] & en[k]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      sum <= '0;
    else if (valid)
      sum <= clear ? terms_now : sum + terms_now;
  end

endmodule

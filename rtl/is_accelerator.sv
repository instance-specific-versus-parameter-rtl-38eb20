// is_accelerator: the instance-specific autocorrelation engine.
//
// A controller, 2*TERMS copies of the function component and a calculator.
// Function components come in pairs: the first of a pair evaluates f(v), the
// second f(v xor u), and the calculator multiplies and sums them, so each pair
// contributes one summation term per clock. With TERMS = 1 the engine is the
// two-component architecture of the source paper's figure and computes one term
// per cycle; raising TERMS replicates the function components to compute
// several terms per cycle, the parallelism explored in the source paper (2 to 252
// function components, i.e. TERMS = 1 .. 126, any value).
//
// Interface: 'start' begins the whole transform, 2^N_VARS coefficients that
// leave through coef_valid/coef_ready/coef_u/coef_value in increasing u;
// 'done' pulses after the last one is accepted. The function itself is fixed
// by the BDD parameters (default xor5).
// Timing: ceil(2^N_VARS / TERMS) cycles per coefficient when the host never
// stalls.
module is_accelerator
  import ac_pkg::*;
#(
  parameter int unsigned N_VARS  = XOR5_VARS,
  parameter int unsigned N_NODES = XOR5_NODES,
  parameter bdd_node_t   NODES [N_NODES] = XOR5_BDD,
  parameter int unsigned TERMS   = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              coef_valid,
  input  logic              coef_ready,
  output logic [N_VARS-1:0] coef_u,
  output logic [N_VARS:0]   coef_value
);

  logic [N_VARS-1:0] va [TERMS];
  logic [N_VARS-1:0] vb [TERMS];
  logic [TERMS-1:0]  fa, fb, term_en;
  logic              term_valid, term_clear;
  logic [N_VARS:0]   calc_sum;

  is_controller #(.N_VARS(N_VARS), .TERMS(TERMS), .SUM_W(N_VARS + 1)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .coef_valid, .coef_ready, .coef_u, .coef_value,
    .va, .vb, .term_en, .term_valid, .term_clear, .calc_sum
  );

  for (genvar k = 0; k < TERMS; k++) begin : g_pair
    bdd_function #(.N_VARS(N_VARS), .N_NODES(N_NODES), .NODES(NODES)) u_fa (.x(va[k]), .f(fa[k]));
    bdd_function #(.N_VARS(N_VARS), .N_NODES(N_NODES), .NODES(NODES)) u_fb (.x(vb[k]), .f(fb[k]));
  end

  ac_calculator #(.TERMS(TERMS), .SUM_W(N_VARS + 1)) u_calc (
    .clk, .rst_n, .valid(term_valid), .clear(term_clear), .en(term_en), .fa, .fb, .sum(calc_sum)
  );

endmodule

// ac_top: the two autocorrelation engines side by side.
//
// The instance-specific engine (is_accelerator) has the function built in as
// a BDD circuit and streams all 2^n coefficients to the host. The
// parameter-specific engine (ps_accelerator) reads any function of up to
// CUBE_BITS inputs as a disjoint cube list from an external SRAM, whose port
// is brought out here, and writes its coefficients back to that SRAM. The two
// share only clock and reset; each has its own host-side ports (prefix is_
// and ps_). Defaults: the instance-specific engine holds xor5 with two
// function components; the parameter-specific engine uses 32-bit cubes and
// 64 parallel coefficients.
module ac_top
  import ac_pkg::*;
#(
  parameter int unsigned IS_N_VARS      = XOR5_VARS,
  parameter int unsigned IS_N_NODES     = XOR5_NODES,
  parameter bdd_node_t   IS_NODES [IS_N_NODES] = XOR5_BDD,
  parameter int unsigned IS_TERMS       = 1,
  parameter int unsigned CUBE_BITS      = PS_CUBE_BITS,
  parameter int unsigned N_PAR          = PS_N_PAR,
  parameter int unsigned MAX_CUBES_LOG2 = PS_MAX_CUBES_LOG2,
  parameter int unsigned RESULT_LOG2    = PS_RESULT_LOG2,
  parameter int unsigned DC_W           = $clog2(CUBE_BITS + 1),
  parameter int unsigned DW             = 2 * CUBE_BITS + DC_W,
  parameter int unsigned AW             = RESULT_LOG2 + 1,
  parameter int unsigned NB_W           = RESULT_LOG2 - $clog2(N_PAR) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // instance-specific engine, host side
  input  logic                    is_start,
  output logic                    is_busy,
  output logic                    is_done,
  output logic                    is_coef_valid,
  input  logic                    is_coef_ready,
  output logic [IS_N_VARS-1:0]    is_coef_u,
  output logic [IS_N_VARS:0]      is_coef_value,
  // parameter-specific engine, host side
  input  logic                    ps_start,
  input  logic [MAX_CUBES_LOG2:0] ps_n_cubes,
  input  logic [CUBE_BITS-1:0]    ps_u_first,
  input  logic [NB_W-1:0]         ps_n_batches,
  output logic                    ps_busy,
  output logic                    ps_done,
  // parameter-specific engine, daughterboard SRAM
  output logic                    sram_en,
  output logic                    sram_we,
  output logic [AW-1:0]           sram_addr,
  output logic [DW-1:0]           sram_wdata,
  input  logic [DW-1:0]           sram_rdata
);

  is_accelerator #(
    .N_VARS(IS_N_VARS), .N_NODES(IS_N_NODES), .NODES(IS_NODES), .TERMS(IS_TERMS)
  ) u_is (
    .clk, .rst_n, .start(is_start), .busy(is_busy), .done(is_done),
    .coef_valid(is_coef_valid), .coef_ready(is_coef_ready),
    .coef_u(is_coef_u), .coef_value(is_coef_value)
  );

  ps_accelerator #(
    .CUBE_BITS(CUBE_BITS), .N_PAR(N_PAR), .MAX_CUBES_LOG2(MAX_CUBES_LOG2),
    .RESULT_LOG2(RESULT_LOG2), .DC_W(DC_W), .DW(DW), .AW(AW), .NB_W(NB_W)
  ) u_ps (
    .clk, .rst_n, .start(ps_start), .n_cubes(ps_n_cubes), .u_first(ps_u_first),
    .n_batches(ps_n_batches), .busy(ps_busy), .done(ps_done),
    .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata
  );

endmodule

// ps_accelerator: the parameter-specific autocorrelation engine (FPGA part).
//
// The function f is given as a list of disjoint cubes (products of literals
// whose minterm sets do not overlap) held in an external SRAM. For a shift u,
// a cube c of the list is moved to c xor u; if that cube lies inside some cube
// of the list, all 2^dc(c) of its minterms v have f(v) = f(v xor u) = 1 and
// the engine adds 2^dc(c) to B(u), dc(c) being the number of inputs c leaves
// free. Summed over all cubes c this gives B(u). (A shifted cube that only
// partly overlaps the list adds nothing; the result is exact whenever every
// shifted cube lies wholly inside or wholly outside the listed cubes, for
// example when the list is a list of minterms.)
//
// Blocks: controller (ps_controller), don't-care counter (dc_counter), cube
// register and don't-care register (below), u generator (u_generator, N_PAR u
// values at once), cube comparison (cube_comparison), comparator (comparator,
// N_PAR sub-components) and contribution registers (contribution_registers).
// Every cube read from SRAM advances all N_PAR coefficients of a batch, so a
// batch costs the same SRAM reads as a single coefficient.
//
// SRAM word (DW = 2*CUBE_BITS + DC_W bits): {dc count, don't-care mask, value};
// bit i of mask/value is input x_i; unused inputs must be fixed to 0.
// Cube i sits at address i. Results: at 2^RESULT_LOG2 + r, zero-extended.
// The host fills the cube words (dc field ignored), sets n_cubes, u_first and
// n_batches, pulses 'start' while idle and waits for 'done'; the results for
// u = u_first + r are then in the result area. The SRAM has one cycle of read
// latency and takes one access per cycle. Timing: see ps_controller.
// Defaults follow the source paper: 32-bit cube words, 64 coefficients in
// parallel, up to 2^19 cubes. The SRAM map and word layout are this design's.
module ps_accelerator
  import ac_pkg::*;
#(
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
  // host side
  input  logic                    start,
  input  logic [MAX_CUBES_LOG2:0] n_cubes,
  input  logic [CUBE_BITS-1:0]    u_first,
  input  logic [NB_W-1:0]         n_batches,
  output logic                    busy,
  output logic                    done,
  // SRAM port
  output logic                    sram_en,
  output logic                    sram_we,
  output logic [AW-1:0]           sram_addr,
  output logic [DW-1:0]           sram_wdata,
  input  logic [DW-1:0]           sram_rdata
);

  if (MAX_CUBES_LOG2 > RESULT_LOG2 || RESULT_LOG2 < $clog2(N_PAR)) begin : g_bad_map
    $error("ps_accelerator: cube area and result area must fit the SRAM map");
  end

  localparam int unsigned IDX_W = (N_PAR > 1) ? $clog2(N_PAR) : 1;
  localparam int unsigned CW    = CUBE_BITS + 1;

  // SRAM word fields
  logic [CUBE_BITS-1:0] rd_val, rd_mask;
  logic [DC_W-1:0]      rd_dcnt;
  assign rd_val  = sram_rdata[CUBE_BITS-1:0];
  assign rd_mask = sram_rdata[2*CUBE_BITS-1:CUBE_BITS];
  assign rd_dcnt = sram_rdata[DW-1:2*CUBE_BITS];

  logic                 wr_result, rd_dc, rd_load, rd_cmp, rd_last;
  logic                 u_load, u_advance, contrib_clear;
  logic [IDX_W-1:0]     result_idx;

  ps_controller #(
    .N_PAR(N_PAR), .MAX_CUBES_LOG2(MAX_CUBES_LOG2), .RESULT_LOG2(RESULT_LOG2),
    .AW(AW), .NB_W(NB_W), .IDX_W(IDX_W)
  ) u_ctrl (
    .clk, .rst_n, .start, .n_cubes, .n_batches, .busy, .done,
    .sram_en, .sram_we, .sram_addr, .wr_result,
    .rd_dc, .rd_load, .rd_cmp, .rd_last,
    .u_load, .u_advance, .contrib_clear, .result_idx
  );

  // Don't-care counter, fed by the cube word on the read bus.
  logic [DC_W-1:0] dc_count;
  dc_counter #(.CUBE_BITS(CUBE_BITS), .DC_W(DC_W)) u_dcc (.dc_mask(rd_mask), .count(dc_count));

  // Cube register and don't-care register: cube c of the outer loop.
  logic [CUBE_BITS-1:0] cube_val_q, cube_mask_q;
  logic [DC_W-1:0]      dc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cube_val_q  <= '0;
      cube_mask_q <= '0;
      dc_q        <= '0;
    end else if (rd_load) begin
      cube_val_q  <= rd_val;
      cube_mask_q <= rd_mask;
      dc_q        <= rd_dcnt;
    end
  end

  // u generator
  logic [CUBE_BITS-1:0] u_vals [N_PAR];
  u_generator #(.CUBE_BITS(CUBE_BITS), .N_PAR(N_PAR)) u_ugen (
    .clk, .rst_n, .load(u_load), .u_first, .advance(u_advance), .u_base(), .u_vals
  );

  // Cube comparison and comparator against the streamed cube d.
  logic                 compatible;
  logic [CUBE_BITS-1:0] care, diff;
  logic [N_PAR-1:0]     hit;

  cube_comparison #(.CUBE_BITS(CUBE_BITS)) u_cmp_cube (
    .c_val(cube_val_q), .c_dc(cube_mask_q), .d_val(rd_val), .d_dc(rd_mask),
    .compatible, .care, .diff
  );

  comparator #(.CUBE_BITS(CUBE_BITS), .N_PAR(N_PAR)) u_comparator (
    .en(rd_cmp), .compatible, .care, .diff, .u_vals, .hit
  );

  // Contribution registers.
  logic [CW-1:0] result;
  contribution_registers #(.CUBE_BITS(CUBE_BITS), .N_PAR(N_PAR), .DC_W(DC_W), .CW(CW), .IDX_W(IDX_W)) u_contrib (
    .clk, .rst_n, .clear(contrib_clear), .hit_valid(rd_cmp), .hit,
    .commit(rd_last), .dc(dc_q), .rd_idx(result_idx), .rd_data(result)
  );

  // Write data: a result, or the cube just read with its don't-care count.
  assign sram_wdata = wr_result ? DW'(result)
                                : {dc_count, rd_mask, rd_val};

  a_we_en: assert property (@(posedge clk) disable iff (!rst_n) sram_we |-> sram_en);
  // A don't-care write-back always follows the read of its cube.
  a_dc_wb: assert property (@(posedge clk) disable iff (!rst_n) sram_we && !wr_result |-> rd_dc);

endmodule

// contribution_registers: one coefficient accumulator per parallel u.
//
// While the cubes of the list stream past one cube c of the list, each
// register k remembers in a 'found' flag whether the shifted cube c xor u_k
// was found inside some cube. On the last cube of the scan ('commit') every
// register whose flag is set (or whose hit arrives in that same cycle) adds
// the weight 2^dc of c, dc being its don't-care count, and the flags are
// cleared for the next c. After all cubes c, register k holds B(u_k).
//
// Interface: 'clear' zeroes accumulators and flags (start of a batch);
// 'hit_valid' with 'hit' from the comparator; 'commit' with the don't-care
// count 'dc' of c. rd_idx selects the accumulator shown on rd_data
// (combinational), used to write the results back to SRAM one per cycle.
// The found-flag scheme and the weight 2^dc follow the source paper's procedure
// and its don't-care counting; the register width (CUBE_BITS+1, enough for
// 2^CUBE_BITS) is this design's choice.
module contribution_registers #(
  parameter int unsigned CUBE_BITS = 32,
  parameter int unsigned N_PAR     = 64,
  parameter int unsigned DC_W      = $clog2(CUBE_BITS + 1),
  parameter int unsigned CW        = CUBE_BITS + 1,
  parameter int unsigned IDX_W     = (N_PAR > 1) ? $clog2(N_PAR) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             hit_valid,
  input  logic [N_PAR-1:0] hit,
  input  logic             commit,
  input  logic [DC_W-1:0]  dc,
  input  logic [IDX_W-1:0] rd_idx,
  output logic [CW-1:0]    rd_data
);

  logic [CW-1:0]    acc [N_PAR];
  logic [N_PAR-1:0] found, found_now;
  logic [CW-1:0]    weight;

  assign found_now = found | (hit_valid ? hit : '0);
  assign weight    = CW'(1) << dc;
  assign rd_data   = acc[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      found <= '0;
      for (int k = 0; k < N_PAR; k++) acc[k] <= '0;
    end else if (clear) begin
      found <= '0;
      for (int k = 0; k < N_PAR; k++) acc[k] <= '0;
    end else if (commit) begin
      found <= '0;
      for (int k = 0; k < N_PAR; k++)
        if (found_now[k]) acc[k] <= acc[k] + weight;
    end else begin
      found <= found_now;
    end
  end

endmodule

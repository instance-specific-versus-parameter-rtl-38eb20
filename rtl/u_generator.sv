// u_generator: produces the N_PAR values of u handled in one batch.
//
// The parameter-specific engine computes N_PAR coefficients B(u) at a time
// (64 in the source paper). The generator holds the first u of the batch and
// presents u_base + k for k = 0 .. N_PAR-1 to the comparator in parallel.
//
// Interface: 'load' sets the base to u_first (start of a run); 'advance' moves
// it on by N_PAR (next batch). Both act at the clock edge; the u values are
// valid from the following cycle on. Consecutive u values per batch are this
// design's choice; the source paper states only that 64 values are generated.
module u_generator #(
  parameter int unsigned CUBE_BITS = 32,
  parameter int unsigned N_PAR     = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [CUBE_BITS-1:0] u_first,
  input  logic                 advance,
  output logic [CUBE_BITS-1:0] u_base,
  output logic [CUBE_BITS-1:0] u_vals [N_PAR]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      u_base <= '0;
    else if (load)
      u_base <= u_first;
    else if (advance)
      u_base <= u_base + CUBE_BITS'(N_PAR);
  end

  always_comb
    for (int k = 0; k < N_PAR; k++)
      u_vals[k] = u_base + CUBE_BITS'(k);

endmodule

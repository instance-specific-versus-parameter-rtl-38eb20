// comparator: N_PAR comparator sub-components working side by side.
//
// The source paper's comparator has 64 sub-components so that 64 coefficients are
// advanced by every cube read from SRAM. Each cell takes one u value from the
// u generator and the shared result of the cube comparison, and raises its hit
// bit when the shifted cube c xor u lies inside the cube being read.
//
// Interface: u_vals (N_PAR values), compatible/care/diff from the cube
// comparison, 'en' when a cube of the list is on the SRAM data bus.
// Output: hit, one bit per u. Combinational, one cube per cycle.
module comparator #(
  parameter int unsigned CUBE_BITS = 32,
  parameter int unsigned N_PAR     = 64
) (
  input  logic                 en,
  input  logic                 compatible,
  input  logic [CUBE_BITS-1:0] care,
  input  logic [CUBE_BITS-1:0] diff,
  input  logic [CUBE_BITS-1:0] u_vals [N_PAR],
  output logic [N_PAR-1:0]     hit
);

  for (genvar k = 0; k < N_PAR; k++) begin : g_cell
    comparator_cell #(.CUBE_BITS(CUBE_BITS)) u_cell (
      .en, .compatible, .care, .diff, .u(u_vals[k]), .hit(hit[k])
    );
  end

endmodule

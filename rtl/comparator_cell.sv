// comparator_cell: one of the comparator's sub-components.
//
// For one shift u it completes the containment test started by the cube
// comparison: the shifted cube c xor u lies in the streamed cube d when the
// pair is compatible and u matches 'diff' on every input d fixes.
// Combinational. One cell per coefficient computed in parallel.
module comparator_cell #(
  parameter int unsigned CUBE_BITS = 32
) (
  input  logic                 en,
  input  logic                 compatible,
  input  logic [CUBE_BITS-1:0] care,
  input  logic [CUBE_BITS-1:0] diff,
  input  logic [CUBE_BITS-1:0] u,
  output logic                 hit
);

  assign hit = en && compatible && (((u ^ diff) & care) == '0);

endmodule

// cube_comparison: the u-independent half of the containment test.
//
// The engine asks, for a cube c of the list and a shift u, whether the cube
// c xor u (c with its fixed inputs flipped where u is 1) lies inside another
// cube d of the list. That holds exactly when
//   (1) every input d fixes is also fixed by c, and
//   (2) on those inputs, c.value xor u equals d.value.
// This block evaluates what does not depend on u: condition (1) as
// 'compatible', and for (2) the care mask (inputs d fixes) and the pattern u
// must show there, diff = (c.value xor d.value) masked by care. The
// comparator then checks all 64 u values against 'diff' at once.
//
// Combinational. Cube encoding (value word plus don't-care mask, 1 = don't
// care) and the split of the test into a shared and a per-u part are this
// design's own choices; the source paper names the block and the search it serves.
module cube_comparison #(
  parameter int unsigned CUBE_BITS = 32
) (
  input  logic [CUBE_BITS-1:0] c_val,
  input  logic [CUBE_BITS-1:0] c_dc,
  input  logic [CUBE_BITS-1:0] d_val,
  input  logic [CUBE_BITS-1:0] d_dc,
  output logic                 compatible,
  output logic [CUBE_BITS-1:0] care,
  output logic [CUBE_BITS-1:0] diff
);

  assign care       = ~d_dc;
  assign compatible = ((c_dc & care) == '0);
  assign diff       = (c_val ^ d_val) & care;

endmodule

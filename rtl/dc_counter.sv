// dc_counter: the don't-care counter of the parameter-specific engine.
//
// A cube is stored as a value word and a don't-care mask (a 1 marks an input
// the cube does not fix). The counter returns the number of ones in the mask,
// which sets the weight 2^count a cube contributes to a coefficient. As in the
// document, the two halves of the cube word are counted in parallel; the two
// half counts are then added.
//
// Interface: dc_mask in, count out. Combinational; the engine samples it into
// the don't-care field of the cube's SRAM word.
// Which halves are split (upper and lower half of the mask) is this design's
// reading of "counting both halves of each cube word in parallel".
module dc_counter #(
  parameter int unsigned CUBE_BITS = 32,
  parameter int unsigned DC_W      = $clog2(CUBE_BITS + 1)
) (
  input  logic [CUBE_BITS-1:0] dc_mask,
  output logic [DC_W-1:0]      count
);

  localparam int unsigned LO_BITS = CUBE_BITS / 2;
  localparam int unsigned HI_BITS = CUBE_BITS - LO_BITS;

  logic [DC_W-1:0] count_lo, count_hi;

  always_comb begin
    count_lo = '0;
    for (int i = 0; i < LO_BITS; i++)
      count_lo += DC_W'(dc_mask[i]);
  end

  always_comb begin
    count_hi = '0;
    for (int i = 0; i < HI_BITS; i++)
      count_hi += DC_W'(dc_mask[LO_BITS + i]);
  end

  assign count = count_lo + count_hi;

endmodule

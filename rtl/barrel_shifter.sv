// barrel_shifter -- logarithmic arithmetic right shifter.
//
// Restores the magnitude of a product whose coefficient was shifted left by s bits
// before it was stored: q = d >>> s (sign-extending). The shifter has SW stages; stage g
// shifts by 2^g when bit g of s is set, so four stages cover shifts of 0..15. Any
// rounding for the discarded bits is done inside the multiplier matrix, so this unit
// only truncates.
//
// A four-stage shifter for 0..15 places follows the published design; the arithmetic
// (sign-filling) shift and the absence of rounding here are choices of this
// implementation that follow from the signed products it is fed.
//
// The top bit of q always equals the top bit of d, as an arithmetic shift requires.
//
// Purely combinational.
module barrel_shifter #(
  parameter int W  = 16,  // data width
  parameter int SW = 4    // number of stages = width of the shift amount
) (
  input  logic signed [W-1:0]  d,  // value to shift
  input  logic        [SW-1:0] s,  // shift amount
  output logic signed [W-1:0]  q   // d >>> s
);

  logic signed [W-1:0] stage [SW+1];

  assign stage[0] = d;

  for (genvar g = 0; g < SW; g++) begin : g_stage
    assign stage[g+1] = s[g] ? (stage[g] >>> (2 ** g)) : stage[g];
  end

  assign q = stage[SW];

endmodule

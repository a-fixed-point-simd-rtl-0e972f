// pe_madd -- signed multiplier-adder of one PE: a*b + c.
//
// a and b are 16-bit signed, c is a 32-bit signed addend. The addend comes
// from a register, the PE's own accumulator or, through the accumulate
// chain, from the neighbouring PE's accumulator, which lets several PEs
// build one long sum. The result is returned at 33 bits so that the
// accumulator can detect overflow. Purely combinational; the PE registers
// it through its pipeline.
//
// From the document: one signed multiplier-adder of 16x16+32 bits per PE,
// neighbour data into the addend input. Returning 33 bits instead of 32 is
// this design's choice, to feed the 33-bit accumulator.
module pe_madd (
  input  logic signed [15:0] a,
  input  logic signed [15:0] b,
  input  logic signed [31:0] c,
  output logic signed [32:0] y
);
  logic signed [31:0] prod;
  assign prod = a * b;
  assign y    = 33'(prod) + 33'(c);
endmodule

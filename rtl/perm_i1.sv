// perm_i1: the fixed 64-bit permutation involution I1.
//
// Bit positions are numbered 1..64 from the most significant bit.  I1 swaps
// position 8r+c+1 with 8c+r+1 (r, c = 0..7), i.e. it transposes the block
// seen as an 8x8 bit matrix whose rows are the bytes: (1)(2,9)(3,17)...(64).
// Byte k of the output collects bit k of every input byte, so bytes that the
// F8/48 boxes processed separately are mixed.  I1(I1(x)) = x.  Pure wiring.
module perm_i1 (
  input  logic [63:0] x,
  output logic [63:0] y
);

  for (genvar r = 0; r < 8; r++) begin : g_row
    for (genvar c = 0; c < 8; c++) begin : g_col
      assign y[63 - (8*c + r)] = x[63 - (8*r + c)];
    end
  end

endmodule

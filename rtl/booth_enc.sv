// booth_enc: radix-4 (modified) Booth encoder.
//
// Recodes the overlapping multiplier triplet {y[2i+1], y[2i], y[2i-1]} into the
// digit y' = y[2i-1] + y[2i] - 2*y[2i+1] in {-2,-1,0,1,2}, given as three
// recoding bits: neg (digit is negative), x1 (|digit| = 1) and x2 (|digit| = 2).
// The 000 and 111 triplets both give zero with neg = 0, as in the standard
// recoding table. The en input ANDs all three outputs, which turns the whole
// partial-product row into zeros; the reconfigurable multiplier uses this to
// switch rows off per mode with three gates per row. Purely combinational.
//
// The recoding table is the standard modified Booth table; the enable gate
// that clears a row follows the published design.
module booth_enc (
  input  logic [2:0] trip,  // {y[2i+1], y[2i], y[2i-1]}
  input  logic       en,
  output logic       neg,
  output logic       x1,
  output logic       x2
);
  always_comb begin
    x1  = en & (trip[1] ^ trip[0]);
    x2  = en & ((trip[2] & ~trip[1] & ~trip[0]) | (~trip[2] & trip[1] & trip[0]));
    neg = en & trip[2] & ~(trip[1] & trip[0]);
  end
endmodule

// bw_mul3: MUL3 of the reconfigurable fixed-width Baugh-Wooley multiplier.
//
// Sums the X1*Y1 quadrant (x[i]y[j], i, j >= n/2, columns n..2n-2) and the
// array's 2^(2n-1) constant. Baugh-Wooley sign handling complements the bits
// where exactly one index is n-1. The quadrant is already a complete signed
// n/2 x n/2 array, so:
//   CM1  part of the n x n fixed-width product
//   CM3  (cm3 = t[1]) full-precision X1*Y1: CP3 adds 2^(3n/2)
//   CM4  (cm4 = t[0]) two n/4 x n/4 full-precision products X2*Y2 (columns
//        n..3n/2-1) and X3*Y3 (3n/2..2n-1), X2/X3 being the quarters of X1.
//        The diagonal sub-blocks get their own sign complement pattern; the
//        xblk bits are forced to zero except x[3n/4]y[n/2] and
//        x[3n/4]y[3n/4-1], forced to one as the X2*Y2 sign constants
//        (x6y4 and x6y5 for n = 8); CP4 adds the X3*Y3 constant at
//        column 3n/2+n/4, and the carry from column 3n/2-1 into 3n/2 is
//        blocked so the two products stay independent.
// Output p: columns n-1..2n-1 (n+1 bits, bit 0 is column n-1 and always 0),
// aligned with MUL1/MUL2. Combinational.
//
// The CM3/CM4 reconfiguration with forced-one bits and CP3/CP4 follows the
// published design; blocking the carry between the two CM4 products is this
// design's addition, needed to keep X3*Y3 exact.
module bw_mul3 #(
  parameter int unsigned N = 16
) (
  input  logic [N/2-1:0] x1,     // x[n-1:n/2]
  input  logic [N/2-1:0] y1,     // y[n-1:n/2]
  input  logic           cm3,
  input  logic           cm4,
  output logic [N:0]     p
);
  localparam int unsigned H  = N / 2;
  localparam int unsigned Q  = N / 4;
  localparam int unsigned LW = H + 3 + $clog2(N);  // columns n-1..3n/2-1 plus carries
  localparam int unsigned HW = H + 1;        // columns 3n/2..2n-1

  logic [LW-1:0] lo;
  logic [HW-1:0] hi;

  always_comb begin
    logic b, a_hi, b_hi, xblk, forced;
    int   col, ti, tj;
    lo = '0;
    hi = '0;
    for (int i = H; i < int'(N); i++) begin
      for (int j = H; j < int'(N); j++) begin
        a_hi   = (i >= int'(H + Q));
        b_hi   = (j >= int'(H + Q));
        xblk  = cm4 && (a_hi != b_hi);
        forced = (i == int'(H + Q)) && (j == int'(H) || j == int'(H + Q) - 1);
        // row/column whose bits carry a sign: n-1, or the X2/Y2 top in CM4
        ti     = (cm4 && !a_hi) ? int'(H + Q) - 1 : int'(N) - 1;
        tj     = (cm4 && !b_hi) ? int'(H + Q) - 1 : int'(N) - 1;
        b      = xblk ? forced : ((x1[i-H] & y1[j-H]) ^ ((i == ti) ^ (j == tj)));
        col    = i + j;
        hi     = hi + ((col >= 3*int'(H)) ? (HW'(b) << (col - 3*int'(H))) : HW'(0));
        lo     = lo + ((col <  3*int'(H)) ? (LW'(b) << (col - (int'(N) - 1))) : LW'(0));
      end
    end
    hi = hi + (HW'(1) << (H - 1));           // 2^(2n-1)
    hi = hi + HW'(cm3);                      // CP3 at column 3n/2
    hi = hi + (HW'(cm4) << Q);               // CP4 at column 3n/2+n/4
    hi = hi + (cm4 ? HW'(0) : HW'(lo >> (H + 1)));   // carry into column 3n/2
  end

  assign p = {hi[H-1:0], lo[H:0]};
endmodule

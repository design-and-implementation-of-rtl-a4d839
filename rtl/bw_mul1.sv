// bw_mul1: MUL1 of the reconfigurable fixed-width Baugh-Wooley multiplier.
//
// Sums the X1*Y0 quadrant (x[i]y[j], i >= n/2, j < n/2) of the Baugh-Wooley
// array from column n-1 up, the quadrant's theta bits (column n-2) and the
// single X0*Y0 bit of the theta column, x[n/2-1]y[n/2-1], all added into
// column n-1 together with scc1, plus the array's +2^n constant.
// In CM1 the bits x[n-1]y[j] are complemented (Baugh-Wooley sign handling).
// In CM2 (cm2 = t[2]) the quadrant becomes a signed n/2 x n/2 fixed-width
// X1*Y0: bits x[i]y[n/2-1] are complemented as well (so x[n-1]y[n/2-1]
// returns to true form), x[n/2-1]y[n/2-1] is forced to zero and CP0 adds the
// sub-product's sign constant at column 3n/2-1.
// Output p: columns n-1..3n/2 (n/2+2 bits, bit 0 is column n-1), so the
// following adder can combine column n-1 with MUL2. km1 = theta bits all zero.
// Combinational; the pipeline registers its operands.
//
// The quadrant split, the constants and the compensation follow the published
// design; the column of CP0 is derived here from the Baugh-Wooley sign
// identity.
module bw_mul1 #(
  parameter int unsigned N = 16
) (
  input  logic [N/2-1:0] x1,     // x[n-1:n/2]
  input  logic [N/2-1:0] y0,     // y[n/2-1:0]
  input  logic           x_mid,  // x[n/2-1]
  input  logic           cm2,
  input  logic           scc1,
  output logic [N/2+1:0] p,
  output logic           km1
);
  localparam int unsigned H  = N / 2;
  localparam int unsigned AW = H + 3;

  logic [AW-1:0] acc;
  logic          th_any;

  always_comb begin
    logic b, xy;
    int   col;
    acc    = '0;
    for (int i = H; i < int'(N); i++) begin
      for (int j = 0; j < int'(H); j++) begin
        b   = x1[i-H] & y0[j];
        b   = b ^ ((i == int'(N) - 1) ^ (cm2 && j == int'(H) - 1));
        col = i + j;
        if (col >= int'(N) - 1) begin
          acc = acc + (AW'(b) << (col - (int'(N) - 1)));
        end else if (col == int'(N) - 2) begin
          acc = acc + AW'(b);
        end
      end
    end
    xy     = x_mid & y0[H-1] & ~cm2;
    acc    = acc + AW'(xy);
    acc    = acc + AW'(scc1);                // K at column n-1
    acc    = acc + AW'(2);                   // +2^n
    acc    = acc + (AW'(cm2) << H);          // CP0 at column 3n/2-1
  end

  // theta column (n-2) zero detection, kept apart from the sum so that the
  // km output does not depend on the scc input
  always_comb begin
    th_any = 1'b0;
    for (int i = H; i < int'(N); i++)
      for (int j = 0; j < int'(H); j++)
        if (i + j == int'(N) - 2) th_any = th_any | (x1[i-H] & y0[j]);
    th_any = th_any | (x_mid & y0[H-1] & ~cm2);
  end

  assign p   = acc[H+1:0];
  assign km1 = ~th_any;
endmodule

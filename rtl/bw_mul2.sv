// bw_mul2: MUL2 of the reconfigurable fixed-width Baugh-Wooley multiplier.
//
// Sums the X0*Y1 quadrant (x[i]y[j], i < n/2, j >= n/2) from column n-1 up,
// with its theta bits (column n-2) and scc2 added into column n-1.
// In CM1 the bits x[i]y[n-1] are complemented. In CM2 (cm2 = t[2]) the
// quadrant becomes a signed n/2 x n/2 fixed-width X0*Y1: bits x[n/2-1]y[j]
// are complemented too (x[n/2-1]y[n-1] returns to true form), and CP1/CP2
// add the sub-product's two sign constants at columns n and 3n/2-1.
// Output p: columns n-1..3n/2 (bit 0 is column n-1). km2 = theta bits zero.
// Combinational.
//
// The quadrant split, the constants and the compensation follow the published
// design; the columns of CP1 and CP2 are derived here from the Baugh-Wooley
// sign identity.
module bw_mul2 #(
  parameter int unsigned N = 16
) (
  input  logic [N/2-1:0] x0,     // x[n/2-1:0]
  input  logic [N/2-1:0] y1,     // y[n-1:n/2]
  input  logic           cm2,
  input  logic           scc2,
  output logic [N/2+1:0] p,
  output logic           km2
);
  localparam int unsigned H  = N / 2;
  localparam int unsigned AW = H + 3;

  logic [AW-1:0] acc;
  logic          th_any;

  always_comb begin
    logic b;
    int   col;
    acc    = '0;
    for (int i = 0; i < int'(H); i++) begin
      for (int j = H; j < int'(N); j++) begin
        b   = x0[i] & y1[j-H];
        b   = b ^ ((j == int'(N) - 1) ^ (cm2 && i == int'(H) - 1));
        col = i + j;
        if (col >= int'(N) - 1) begin
          acc = acc + (AW'(b) << (col - (int'(N) - 1)));
        end else if (col == int'(N) - 2) begin
          acc = acc + AW'(b);
        end
      end
    end
    acc = acc + AW'(scc2);                   // K at column n-1
    acc = acc + (AW'(cm2) << 1);             // CP1 at column n
    acc = acc + (AW'(cm2) << H);             // CP2 at column 3n/2-1
  end

  // theta column (n-2) zero detection, kept apart from the sum so that the
  // km output does not depend on the scc input
  always_comb begin
    th_any = 1'b0;
    for (int i = 0; i < int'(H); i++)
      for (int j = H; j < int'(N); j++)
        if (i + j == int'(N) - 2) th_any = th_any | (x0[i] & y1[j-H]);
  end

  assign p   = acc[H+1:0];
  assign km2 = ~th_any;
endmodule

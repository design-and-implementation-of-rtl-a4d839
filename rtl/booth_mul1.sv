// booth_mul1: MUL1 of the reconfigurable fixed-width Booth multiplier.
//
// Holds the Booth rows driven by the low multiplier half Y0 (rows 0..n/4-1)
// of an n x n fixed-width array that keeps n+1 columns (w = 1). Each row is
// y'_i * X in sign-generate form: bits S[i][j] = (x1&x[j] | x2&x[j-1]) ^ neg at
// column 2i+j, the complemented sign bit at column n+2i and a constant one at
// column n+2i+1; MUL1 also carries the global +2^n constant. Columns below
// n-2 are not built. The theta column (n-2) and the Emain column (n-1) feed the
// adaptive bias: theta bits are added into column n-1 together with scc1, so
// the carry into column n is floor((Emain + theta + K)/2).
//
// Because every row bit at column n-1 or above depends on X1 only, the same
// array is X1*Y0 as an n/2 x n/2 fixed-width product in CM2/CM4 without any
// change. y_en = 0 (CM3) clears the multiplier bits in front of the encoders;
// the zero rows and the constants then sum to exactly 2^(3n/2), so p = 0 (apart from
// scc1, which is 0 in CM3) and only co is set, which the caller drops outside CM1.
//
// Outputs: p = columns n-1..3n/2-1 (bit 0 is column n-1, so the last-stage
// adder can combine the column n-1 sums of MUL1 and MUL2 in CM1), co = carry
// Co_m1 into column 3n/2.
// km1 = 1 when all theta bits are zero. Combinational.
//
// The row split, the sign-generate form, the theta-based bias and the zeroing
// gate follow the published design. Passing the column n-1 sum bit on to the
// last-stage adder, rather than only a carry, is this design's choice: it
// keeps the compensation carry of the two halves exact.
module booth_mul1 #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   x,
  input  logic [N/2-1:0] y0,
  input  logic           y_en,
  input  logic           scc1,
  output logic [N/2:0]   p,
  output logic           co,
  output logic           km1
);
  localparam int unsigned ROWS = N / 4;
  localparam int unsigned AW   = N / 2 + 3;

  logic [N/2-1:0]  ym;
  logic [N/2:0]    yx;            // {Y0, y[-1] = 0}
  logic [ROWS-1:0] neg, one, two;

  assign ym = y0 & {(N/2){y_en}};
  assign yx = {ym, 1'b0};

  for (genvar i = 0; i < ROWS; i++) begin : g_enc
    booth_enc u_enc (.trip(yx[2*i+2 -: 3]), .en(1'b1), .neg(neg[i]), .x1(one[i]), .x2(two[i]));
  end

  logic [AW-1:0] acc;
  logic          th_any;

  // theta detection is kept apart from the sum so that km1 depends on the
  // operands only (scc1 is derived from km1)
  always_comb begin
    logic xj, xjm1;
    th_any = 1'b0;
    for (int i = 0; i < ROWS; i++) begin
      if (int'(N) - 2 - 2*i >= 1) begin
        xj     = x[(int'(N) - 2 - 2*i >= 1) ? N-2-2*i : 1];
        xjm1   = x[(int'(N) - 2 - 2*i >= 1) ? N-3-2*i : 0];
        th_any = th_any | (((one[i] & xj) | (two[i] & xjm1)) ^ neg[i]);
      end
    end
  end

  always_comb begin
    logic s, xj, xjm1;
    int   col;
    acc    = '0;
    for (int i = 0; i < ROWS; i++) begin
      for (int j = 0; j <= N; j++) begin
        xj   = (j < N) ? x[(j < N) ? j : N-1] : x[N-1];
        xjm1 = (j > 0) ? x[(j > 0) ? j-1 : 0] : 1'b0;
        s    = ((one[i] & xj) | (two[i] & xjm1)) ^ neg[i];
        col  = 2*i + j;
        if (j == N) begin
          acc = acc + (AW'({~s}) << (2*i + 1));       // complemented sign
          acc = acc + (AW'(1)  << (2*i + 2));       // sign-generate one
        end else if (col >= int'(N) - 1) begin
          acc = acc + (AW'(s) << (col - (int'(N) - 1)));
        end else if (col == int'(N) - 2) begin
          acc    = acc + AW'(s);                    // theta into column n-1
        end
      end
    end
    acc = acc + AW'(2);                             // +2^n
    acc = acc + AW'(scc1);                          // K at column n-1
  end

  assign p   = acc[N/2:0];
  assign co  = acc[N/2+1];
  assign km1 = ~th_any;
endmodule

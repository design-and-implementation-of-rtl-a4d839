// booth_mul2: MUL2 of the reconfigurable fixed-width Booth multiplier.
//
// Holds the Booth rows driven by the high multiplier half (rows n/4..n/2-1)
// and reconfigures them per mode, with control word cs from booth_dec:
//  CM1 (cs[0])  plain rows of the n x n fixed-width array; the lowest row's
//               encoder sees y[n/2-1], in all other modes a zero.
//  CM2/CM4 (cs[1])  an n/2 x n/2 fixed-width X0*Y1 in the low half: row bit
//               j = n/2 takes multiplicand inputs {x[n/2-1], x[n/2-1]} and is
//               inverted (sub-word sign), bit n/2+1 is forced to one, higher
//               bits use recoding bits ANDed off, so after the permanent sign
//               inversion the high half sums to exactly zero. CP0 adds the
//               sub-word +2^(n/2) constant at column n, CP1 the cancelling one
//               at column 3n/2.
//  CM3 (cs[2])  the n/2 x n/2 full-precision X1*Y1 over both halves: bit n/2
//               takes inputs {x[n/2], 0}, bits below n/2 are zero except bit
//               n/2-2 of row k+1, which carries neg_k; CP2 = neg of the last
//               row at column 3n/2-2; CP1 supplies +2^(3n/2).
// The low half (columns n-1..3n/2-1) and high half (3n/2..2n-1) are summed
// separately; the carry word of the low half (Co_m2) enters the high half only
// in CM1 and CM3. Theta bits are added into column n-1 with scc2.
//
// Outputs p_lo = columns n..3n/2-1, p_hi = columns 3n/2..2n-1, km2 = theta
// bits all zero. Combinational.
//
// The per-mode bit reconfiguration and CP0..CP2 follow the published design,
// generalised from its n = 8 description to any n divisible by 4; the
// accumulator widths are this design's.
module booth_mul2 #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   x,
  input  logic [N/2:0]   y1,     // {y[n-1:n/2], y[n/2-1]}
  input  logic [2:0]     cs,
  input  logic           scc2,
  output logic [N/2:0]   p_lo,
  output logic [N/2-1:0] p_hi,
  output logic           km2
);
  localparam int unsigned R0   = N / 4;        // first row index
  localparam int unsigned ROWS = N / 4;
  localparam int unsigned LW   = N / 2 + 3 + $clog2(N);  // low-half accumulator
  localparam int unsigned HW   = N / 2 + 2;    // high-half accumulator

  logic cm1, sub, fp;
  assign cm1 = cs[0];
  assign sub = cs[1];
  assign fp  = cs[2];

  logic [N/2:0]    yg;
  logic [ROWS-1:0] neg, one, two;
  assign yg = {y1[N/2:1], y1[0] & cm1};

  for (genvar r = 0; r < ROWS; r++) begin : g_enc
    booth_enc u_enc (.trip(yg[2*r+2 -: 3]), .en(1'b1), .neg(neg[r]), .x1(one[r]), .x2(two[r]));
  end

  logic [LW-1:0] lo;
  logic [HW-1:0] hi;
  logic          th_any;

  // Theta detection kept apart from the sum so that km2 depends on the
  // operands only (scc2 is derived from km2). Theta bits (column n-2) are row
  // bits j = n-2-2i <= n/2-2: unchanged in CM1/CM2/CM4, all zero in CM3.
  always_comb begin
    logic xj, xjm1;
    int   j;
    th_any = 1'b0;
    for (int r = 0; r < ROWS; r++) begin
      j = int'(N) - 2 - 2*(r + int'(R0));
      if (j >= 1) begin
        xj     = x[(j >= 1) ? j : 1];
        xjm1   = x[(j >= 1) ? j-1 : 0];
        th_any = th_any | (((one[r] & xj) | (two[r] & xjm1)) ^ neg[r]);
      end else if (j == 0) begin
        th_any = th_any | ((one[r] & x[0]) ^ neg[r]);
      end
    end
    th_any = th_any & ~fp;
  end

  always_comb begin
    logic s, xj, xjm1, ng, o1, o2;
    int   col, i;
    lo     = '0;
    hi     = '0;
    for (int r = 0; r < ROWS; r++) begin
      i = r + R0;
      for (int j = 0; j <= N; j++) begin
        xj   = (j < N) ? x[(j < N) ? j : N-1] : x[N-1];
        xjm1 = (j > 0) ? x[(j > 0) ? j-1 : 0] : 1'b0;
        // recoding bits, ANDed off above the sub-word in CM2/CM4
        ng = neg[r];
        o1 = one[r];
        o2 = two[r];
        if (sub && j > N/2 + 1) begin
          ng = 1'b0; o1 = 1'b0; o2 = 1'b0;
        end
        s = ((o1 & xj) | (o2 & xjm1)) ^ ng;
        if (fp && j < N/2)
          s = (j == N/2 - 2 && r > 0) ? neg[(r > 0) ? r-1 : 0] : 1'b0;
        else if (fp && j == N/2)
          s = (one[r] & x[N/2]) ^ neg[r];
        else if (sub && j == N/2)
          s = ~((((one[r] | two[r]) & x[N/2-1])) ^ neg[r]);
        else if (sub && j == N/2 + 1)
          s = 1'b1;
        col = 2*i + j;
        if (j == N) begin
          // complemented sign and sign-generate one (always in the high half)
          hi = hi + (HW'({~s}) << (col - 3*int'(N)/2));
          hi = hi + (HW'(1)  << (col + 1 - 3*int'(N)/2));
        end else if (col >= 3*int'(N)/2) begin
          hi = hi + (HW'(s) << (col - 3*int'(N)/2));
        end else if (col >= int'(N) - 1) begin
          lo = lo + (LW'(s) << (col - (int'(N) - 1)));
        end else if (col == int'(N) - 2) begin
          lo = lo + LW'(s);                                  // theta
        end
      end
    end
    lo = lo + LW'(scc2);                                      // K at column n-1
    lo = lo + (LW'(sub) << 1);                                // CP0 at column n
    lo = lo + (LW'(fp & neg[ROWS-1]) << (N/2 - 1));           // CP2 at column 3n/2-2
    hi = hi + HW'({~cm1});                                      // CP1 at column 3n/2
    if (cm1 || fp)
      hi = hi + HW'(lo >> (N/2 + 1));                         // Co_m2 carries
  end

  assign p_lo = lo[N/2:0];
  assign p_hi = hi[N/2-1:0];
  assign km2  = ~th_any;
endmodule

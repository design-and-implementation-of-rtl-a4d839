// booth_rfw_mult: reconfigurable fixed-width Booth multiplier (combinational).
//
// An n x n radix-4 Booth multiplier that keeps only the n+1 most significant
// columns of its partial-product array (fixed width, w = 1) and replaces the
// discarded part with an adaptive compensation bias. The array is split by
// Booth rows into MUL1 (rows of Y0) and MUL2 (rows of Y1); a mode decoder
// reconfigures a few partial-product bits and constants so that the same
// array provides four modes (op, see rfw_pkg):
//   CM1  p = X*Y / 2^n, n-bit fixed-width product
//   CM2  p = {X0*Y1, X1*Y0}, two n/2-bit fixed-width products
//   CM3  p = X1*Y1, exact n-bit product of the upper halves
//   CM4  p = X1*Y0 + X0*Y1 of the two fixed-width products, sign-extended
// The last-stage adder sums MUL1 and MUL2, including their column n-1 bits so
// that the compensation carry of the two halves is not lost. In CM2 the MUL2 low half is ANDed
// off at its input so the low half of the sum is MUL1 alone, and the upper
// output half is taken from MUL2's low half. In CM4 both n/2-bit products are
// sign-extended before the add. Co_m1 enters the adder only in CM1.
// The sub-word products are X1*Y0 and X0*Y1 rather than X0*Y0 and X1*Y1
// because they fall on the existing array without exchanging operands.
// Interface: op, x, y in; p out. No clock; the result settles combinationally.
//
// The decoder, MUL1/MUL2, SCC, last-stage adder and CM4 sign extension follow
// the published structure; the CM2 output packing and the width of the adder
// are this design's choices.
module booth_rfw_mult
  import rfw_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  cm_e          op,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] p
);
  localparam int unsigned H = N / 2;

  logic [3:0]   cs;
  logic [H:0]   p1, p2lo;         // bit 0 is column n-1
  logic [H-1:0] p2hi;
  logic         co1, km1, km2, scc1, scc2;

  booth_dec u_dec (.op(op), .cs(cs));

  booth_mul1 #(.N(N)) u_mul1 (
    .x(x), .y0(y[H-1:0]), .y_en(~cs[2]), .scc1(scc1),
    .p(p1), .co(co1), .km1(km1)
  );

  booth_mul2 #(.N(N)) u_mul2 (
    .x(x), .y1(y[N-1:H-1]), .cs(cs[2:0]), .scc2(scc2),
    .p_lo(p2lo), .p_hi(p2hi), .km2(km2)
  );

  rfw_scc u_scc (.km1(km1), .km2(km2), .cm1(cs[0]), .sub(cs[1]), .scc1(scc1), .scc2(scc2));

  // last-stage adder, columns n-1..2n-1, with CM4 sign-extension muxes and
  // CM2 input gating; column n-1 is only there to pass its carry
  logic [N:0] a, b, s;
  always_comb begin
    if (cs[3]) begin
      a = {{H{p2lo[H]}}, p2lo[H:1], 1'b0};
      b = {{H{p1[H]}}, p1[H:1], 1'b0};
    end else begin
      a = {p2hi, (cs[1] ? {(H+1){1'b0}} : p2lo)};
      b = {{(H-1){1'b0}}, co1 & cs[0], p1};
    end
    s = a + b;
  end

  // output arrangement
  always_comb begin
    unique case ({cs[1], cs[3]})
      2'b10:   p = {p2lo[H:1], s[H:1]};              // CM2
      2'b11:   p = {{(H-1){s[H+1]}}, s[H+1:1]};      // CM4
      default: p = s[N:1];                           // CM1, CM3
    endcase
  end
endmodule

// rfw_scc: sub-calibration circuits SCC1 and SCC2.
//
// Each half of the fixed-width array (MUL1, MUL2) reports Km = 1 when its
// share of the theta column (column n-2) is all zero. The adaptive bias adds
// the constant K = 1/2 (one bit at column n-1) when theta is zero. When the two
// halves form one n x n multiplier (CM1) the constant must be added once, only
// if both halves are zero, so SCC1 = Km1 & Km2 and SCC2 = 0. When the halves
// are independent n/2 x n/2 multipliers each adds its own: SCC1 = Km1,
// SCC2 = Km2. In the remaining full-precision modes (sub = 0, cm1 = 0) both
// outputs are 0 so that nothing is added to a full-precision result.
// Combinational.
//
// The CM1 and CM2/CM4 rules follow the published truth table; the zero outputs
// in CM3 are this design's choice.
module rfw_scc (
  input  logic km1,
  input  logic km2,
  input  logic cm1,
  input  logic sub,   // halves work as two n/2 x n/2 fixed-width multipliers
  output logic scc1,
  output logic scc2
);
  always_comb begin
    scc1 = cm1 ? (km1 & km2) : (sub & km1);
    scc2 = cm1 ? 1'b0 : (sub & km2);
  end
endmodule

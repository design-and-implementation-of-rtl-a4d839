// bw_dec: mode decoder of the pipelined reconfigurable Baugh-Wooley multiplier.
//
// One-hot control t[3:0] from the two-bit OP code:
//   CM1 -> 1000, CM2 -> 0100, CM3 -> 0010, CM4 -> 0001.
// t[3] selects the accumulated CM1 result (and enables the ADD1 registers),
// t[2] configures MUL1/MUL2 for CM2 (CP0..CP2), t[1] and t[0] configure MUL3
// for CM3 (CP3) and CM4 (CP4). Combinational; the pipeline registers it.
//
// The one-hot code table follows the published decoder; the two-bit mode
// encoding is this design's reading of it.
module bw_dec
  import rfw_pkg::*;
(
  input  cm_e        op,
  output logic [3:0] t
);
  always_comb begin
    unique case (op)
      CM1:     t = 4'b1000;
      CM2:     t = 4'b0100;
      CM3:     t = 4'b0010;
      default: t = 4'b0001;  // CM4
    endcase
  end
endmodule

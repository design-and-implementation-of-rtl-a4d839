// booth_dec: mode decoder of the reconfigurable fixed-width Booth multiplier.
//
// Turns the two-bit OP code into the control word CS[3:0]:
//   CM1 -> 0001, CM2 -> 0010, CM3 -> 0100, CM4 -> 1010.
// CS[0] marks CM1, CS[1] the sub-word configuration shared by CM2 and CM4,
// CS[2] the full-precision configuration of CM3 and CS[3] the summing output
// of CM4. The configuration parameters follow directly: CP0 = CS[1],
// CP1 = ~CS[0], CP2 = CS[2] & neg of the last Booth row. Combinational.
//
// The code table follows the published decoder; the two-bit mode encoding is
// this design's reading of it.
module booth_dec
  import rfw_pkg::*;
(
  input  cm_e        op,
  output logic [3:0] cs
);
  always_comb begin
    unique case (op)
      CM1:     cs = 4'b0001;
      CM2:     cs = 4'b0010;
      CM3:     cs = 4'b0100;
      default: cs = 4'b1010;  // CM4
    endcase
  end
endmodule

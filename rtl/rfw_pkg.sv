// rfw_pkg: shared types for the reconfigurable fixed-width multipliers.
//
// Both multipliers offer four configuration modes selected by a two-bit OP
// code. The code values are the ones of the mode decoder tables; the meaning
// of each mode differs slightly between the Booth and Baugh-Wooley designs:
//   CM1  n x n fixed-width product (both designs)
//   CM2  two n/2 x n/2 fixed-width products X1*Y0 and X0*Y1 (both designs)
//   CM3  one n/2 x n/2 full-precision product X1*Y1 (both designs)
//   CM4  Booth: sum X1*Y0 + X0*Y1 of the two fixed-width products
//        Baugh-Wooley: two n/4 x n/4 full-precision products X2*Y2, X3*Y3
// X1/X0 are the upper/lower halves of X, X3/X2 the upper/lower quarters of X1.
//
// The four mode names follow the published design; their two-bit code values
// are this design's reading of the decoder tables.
package rfw_pkg;

  typedef enum logic [1:0] {
    CM1 = 2'b00,
    CM2 = 2'b01,
    CM3 = 2'b10,
    CM4 = 2'b11
  } cm_e;

endpackage

// tb_booth_mul2: exhaustive test (n = 8) of the Y1 half of the fixed-width
// Booth array in each of its configurations.
//  CM1 (cs = 001): rows n/4..n/2-1 with y[n/2-1] as their lowest recoding bit.
//    By arithmetic their sign-generate form adds up to
//    X*(Y1*2^(n/2) + y[n/2-1]*2^(n/2)) - sum(neg_i*4^i) + 3*2^n*(sum 4^i);
//    without the row bits below column n-1, shifted by n-1, plus theta and
//    scc2, this gives the n+1 columns {p_hi, p_lo} modulo 2^(n+1).
//  CM2/CM4 (cs = 010): p_lo[n/2:1] is the n/2-bit fixed-width X0*Y1 (scc2 =
//    km2) and the upper half p_hi sums to zero.
//  CM3 (cs = 100): {p_hi, p_lo[n/2:1]} is the exact X1*Y1 and km2 = 1.
// km2 must be 1 exactly when no theta bit is set (CM1, CM2/CM4).
//
// Stimulus, reference model and checks are this testbench's own; the behaviour
// they expect is the published arithmetic of the multipliers, with this
// design's choices where the header of the module under test names them.
module tb_booth_mul2;
  import rfw_ref_pkg::*;
  localparam int N = 8, H = N / 2, R = N / 4;
  int checks = 0, failures = 0;

  logic [N-1:0] x;
  logic [H:0]   y1;
  logic [2:0]   cs;
  logic         scc2, km2;
  logic [H:0]   p_lo;
  logic [H-1:0] p_hi;

  booth_mul2 #(.N(N)) dut (.x, .y1, .cs, .scc2, .p_lo, .p_hi, .km2);

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic fail(input string what);
    failures++;
    if (failures < 10) $display("FAIL %s x=%h y1=%h cs=%b scc2=%b lo=%b hi=%b", what, x, y1, cs, scc2, p_lo, p_hi);
  endtask

  initial begin
    longint xs, v, l, row, mag, exp, yv;
    int d, th;
    for (int xi = 0; xi < (1 << N); xi++)
      for (int yi = 0; yi < (1 << (H + 1)); yi++) begin
        x  = N'(xi);
        y1 = (H+1)'(yi);
        xs = sx(xi, N);
        // CM1
        yv = longint'(yi) << (N / 2);              // bit 0 = y[-1]; y[n/2-1] at bit n/2
        v = 0; l = 0; th = 0;
        for (int i = R; i < 2 * R; i++) begin
          d   = bdigit(yv, i);
          mag = (d < 0 ? -d : d) * xs;
          row = (d < 0) ? ~mag : mag;
          v  += longint'(d) * xs * (longint'(1) << (2*i)) - ((d < 0) ? (longint'(1) << (2*i)) : 0)
              + 3 * (longint'(1) << (N + 2*i));
          for (int j = 0; j < N; j++) begin
            if (2*i + j < N - 1) l += bit1(row, j) << (2*i + j);
            if (2*i + j == N - 2) th += int'(bit1(row, j));
          end
        end
        for (int k = 0; k < 2; k++) begin
          cs = 3'b001; scc2 = k[0];
          #1;
          exp = bits(((v - l) >>> (N - 1)) + th + k, 0, N + 1);
          checks += 2;
          if ({p_hi, p_lo} !== (N+1)'(exp)) fail("CM1");
          if (km2 !== (th == 0)) fail("km2");
        end
        // CM2/CM4: y[n/2-1] is ignored
        cs = 3'b010; scc2 = 0;
        #1;
        scc2 = km2;
        #1;
        checks += 2;
        if (p_lo[H:1] !== H'(booth_ref(N, 1, xi, longint'(yi >> 1) << H) >> H)) fail("CM2 X0*Y1");
        if (p_hi !== '0) fail("CM2 upper half");
        // CM3
        cs = 3'b100; scc2 = 0;
        #1;
        checks += 2;
        if ({p_hi, p_lo[H:1]} !== N'(sx(xi >> H, H) * sx(yi >> 1, H))) fail("CM3 X1*Y1");
        if (km2 !== 1'b1) fail("CM3 km2");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

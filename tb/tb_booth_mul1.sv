// tb_booth_mul1: exhaustive test (n = 8) of the Y0 half of the fixed-width
// Booth array, for every x, Y0, scc1 and y_en.
//
// Expected value, from arithmetic: the sign-generate rows 0..n/4-1 plus the
// +2^n constant add up to X*Y0 - sum(neg_i * 4^i) + 2^(3n/2) (each row adds
// 3 * 2^(n+2i) through its sign-generate bits). Removing the row bits below
// column n-1, shifting by n-1, and adding the theta count and scc1 gives the
// columns n-1..3n/2 that {co, p} must hold. km1 must be 1 exactly when no
// theta bit is set. With y_en = 0 the rows are zero, so {co, p} = 2^(n/2+1) + scc1.
// The test also checks that in the sub-word modes p[n/2:1] is the n/2-bit
// fixed-width product X1*Y0 given by the reference model.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour
// they expect is the published arithmetic of the multipliers, with this
// design's choices where the header of the module under test names them.
module tb_booth_mul1;
  import rfw_ref_pkg::*;
  localparam int N = 8, H = N / 2, R = N / 4;
  int checks = 0, failures = 0;

  logic [N-1:0] x;
  logic [H-1:0] y0;
  logic         y_en, scc1, co, km1;
  logic [H:0]   p;

  booth_mul1 #(.N(N)) dut (.x, .y0, .y_en, .scc1, .p, .co, .km1);

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    longint xs, v, l, row, mag, exp;
    int d, th;
    for (int e = 0; e < 2; e++)
      for (int xi = 0; xi < (1 << N); xi++)
        for (int yi = 0; yi < (1 << H); yi++)
          for (int k = 0; k < 2; k++) begin
            x = N'(xi); y0 = H'(yi); y_en = e[0]; scc1 = k[0];
            #1;
            xs = sx(xi, N);
            v  = longint'(1) << (3 * N / 2);
            l  = 0; th = 0;
            for (int i = 0; i < R; i++) begin
              d   = e ? bdigit(longint'(yi) << 1, i) : 0;
              mag = (d < 0 ? -d : d) * xs;
              row = (d < 0) ? ~mag : mag;
              v  += longint'(d) * xs * (longint'(1) << (2*i)) - ((d < 0) ? (longint'(1) << (2*i)) : 0);
              for (int j = 0; j < N; j++) begin
                if (2*i + j < N - 1) l += bit1(row, j) << (2*i + j);
                if (2*i + j == N - 2) th += int'(bit1(row, j));
              end
            end
            exp = bits(((v - l) >>> (N - 1)) + th + k, 0, H + 2);
            checks += 2;
            if ({co, p} !== (H+2)'(exp)) begin
              failures++;
              if (failures < 10) $display("FAIL x=%h y0=%h en=%0d scc1=%0d got %b exp %b", x, y0, e, k, {co, p}, (H+2)'(exp));
            end
            if (km1 !== (th == 0)) begin
              failures++;
              if (failures < 10) $display("FAIL km1 x=%h y0=%h", x, y0);
            end
            // sub-word use: scc1 = km1 gives the fixed-width X1*Y0
            if (e == 1 && k == int'(km1)) begin
              checks++;
              if (p[H:1] !== H'(booth_ref(N, 1, xi, yi))) begin
                failures++;
                if (failures < 10) $display("FAIL sub-word x=%h y0=%h", x, y0);
              end
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

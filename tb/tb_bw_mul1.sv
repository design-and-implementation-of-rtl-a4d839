// tb_bw_mul1: exhaustive test (n = 8) of the X1*Y0 quadrant of the
// fixed-width Baugh-Wooley array.
//  CM1 (cm2 = 0): the quadrant bits x_i*y_j (i >= n/2, j < n/2, inverted
//    for i = n-1), the extra bit x[n/2-1]*y[n/2-1] in column n-2, the 2^n
//    constant and scc1 in column n-1. The expected {p} is the sum of the bits
//    in columns >= n-1 divided by 2^(n-1), plus the number of theta (column
//    n-2) bits, plus 2 and scc1, modulo 2^(n/2+2). km1 = no theta bit set.
//  CM2 (cm2 = 1): with scc1 = km1, p[n/2:1] is the n/2-bit fixed-width
//    signed product X1*Y0 of the reference model.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour
// they expect is the published arithmetic of the multipliers, with this
// design's choices where the header of the module under test names them.
module tb_bw_mul1;
  import rfw_ref_pkg::*;
  localparam int N = 8, H = N / 2;
  int checks = 0, failures = 0;

  logic [H-1:0] x1, y0;
  logic         x_mid, cm2, scc1, km1;
  logic [H+1:0] p;

  bw_mul1 #(.N(N)) dut (.x1, .y0, .x_mid, .cm2, .scc1, .p, .km1);

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    longint xv, s, b, exp;
    int th;
    for (int xi = 0; xi < (1 << H); xi++)
      for (int yi = 0; yi < (1 << H); yi++)
        for (int m = 0; m < 2; m++) begin
          x1 = H'(xi); y0 = H'(yi); x_mid = m[0];
          xv = (longint'(xi) << H) | (longint'(m) << (H - 1));
          // CM1
          s = 0; th = 0;
          for (int i = H; i < N; i++)
            for (int j = 0; j < H; j++) begin
              b = bit1(xv, i) & bit1(yi, j);
              if (i == N - 1) b = b ^ 1;
              if (i + j >= N - 1) s += b << (i + j);
              if (i + j == N - 2) th += int'(b);
            end
          b = bit1(xv, H - 1) & bit1(yi, H - 1);
          th += int'(b);
          for (int k = 0; k < 2; k++) begin
            cm2 = 0; scc1 = k[0];
            #1;
            exp = bits((s >> (N - 1)) + th + 2 + k, 0, H + 2);
            checks += 2;
            if (p !== (H+2)'(exp)) begin
              failures++;
              if (failures < 10) $display("FAIL CM1 x1=%h y0=%h xm=%b scc1=%0d p=%b exp %b", x1, y0, x_mid, k, p, (H+2)'(exp));
            end
            if (km1 !== (th == 0)) begin
              failures++;
              if (failures < 10) $display("FAIL km1 x1=%h y0=%h xm=%b", x1, y0, x_mid);
            end
          end
          // CM2
          cm2 = 1; scc1 = 0;
          #1;
          scc1 = km1;
          #1;
          checks++;
          if (p[H:1] !== H'(bw_fw(N, xv, yi, H, H, 0, H))) begin
            failures++;
            if (failures < 10) $display("FAIL CM2 x1=%h y0=%h p=%b", x1, y0, p);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

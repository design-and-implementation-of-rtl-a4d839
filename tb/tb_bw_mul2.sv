// tb_bw_mul2: exhaustive test (n = 8) of the X0*Y1 quadrant of the
// fixed-width Baugh-Wooley array.
//  CM1 (cm2 = 0): the quadrant bits x_i*y_j (i < n/2, j >= n/2, inverted
//    for j = n-1) and scc2 in column n-1. The expected p is the sum of the
//    bits in columns >= n-1 divided by 2^(n-1), plus the number of theta bits
//    and scc2, modulo 2^(n/2+2). km2 = no theta bit set.
//  CM2 (cm2 = 1): with scc2 = km2, p[n/2:1] is the n/2-bit fixed-width
//    signed product X0*Y1 of the reference model.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour
// they expect is the published arithmetic of the multipliers, with this
// design's choices where the header of the module under test names them.
module tb_bw_mul2;
  import rfw_ref_pkg::*;
  localparam int N = 8, H = N / 2;
  int checks = 0, failures = 0;

  logic [H-1:0] x0, y1;
  logic         cm2, scc2, km2;
  logic [H+1:0] p;

  bw_mul2 #(.N(N)) dut (.x0, .y1, .cm2, .scc2, .p, .km2);

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    longint yv, s, b, exp;
    int th;
    for (int xi = 0; xi < (1 << H); xi++)
      for (int yi = 0; yi < (1 << H); yi++) begin
        x0 = H'(xi); y1 = H'(yi);
        yv = longint'(yi) << H;
        s = 0; th = 0;
        for (int i = 0; i < H; i++)
          for (int j = H; j < N; j++) begin
            b = bit1(xi, i) & bit1(yv, j);
            if (j == N - 1) b = b ^ 1;
            if (i + j >= N - 1) s += b << (i + j);
            if (i + j == N - 2) th += int'(b);
          end
        for (int k = 0; k < 2; k++) begin
          cm2 = 0; scc2 = k[0];
          #1;
          exp = bits((s >> (N - 1)) + th + k, 0, H + 2);
          checks += 2;
          if (p !== (H+2)'(exp)) begin
            failures++;
            if (failures < 10) $display("FAIL CM1 x0=%h y1=%h scc2=%0d p=%b exp %b", x0, y1, k, p, (H+2)'(exp));
          end
          if (km2 !== (th == 0)) begin
            failures++;
            if (failures < 10) $display("FAIL km2 x0=%h y1=%h", x0, y1);
          end
        end
        cm2 = 1; scc2 = 0;
        #1;
        scc2 = km2;
        #1;
        checks++;
        if (p[H:1] !== H'(bw_fw(N, xi, yv, 0, H, H, H))) begin
          failures++;
          if (failures < 10) $display("FAIL CM2 x0=%h y1=%h p=%b", x0, y1, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bw_mul3: exhaustive test (n = 8) of the X1*Y1 quadrant of the
// Baugh-Wooley array in its three configurations.
//  CM1 (cm3 = cm4 = 0): the quadrant bits x_i*y_j (i, j >= n/2, inverted
//    when exactly one index is n-1) plus 2^(2n-1); p is their sum divided by
//    2^(n-1), modulo 2^(n+1).
//  CM3 (cm3 = 1): p[n:1] is the exact signed product X1*Y1.
//  CM4 (cm4 = 1): p[n:1] = {X3*Y3, X2*Y2}, two exact n/4 x n/4 products.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour
// they expect is the published arithmetic of the multipliers, with this
// design's choices where the header of the module under test names them.
module tb_bw_mul3;
  import rfw_ref_pkg::*;
  localparam int N = 8, H = N / 2;
  int checks = 0, failures = 0;

  logic [H-1:0] x1, y1;
  logic         cm3, cm4;
  logic [N:0]   p;

  bw_mul3 #(.N(N)) dut (.x1, .y1, .cm3, .cm4, .p);

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    longint xv, yv, s, b;
    for (int xi = 0; xi < (1 << H); xi++)
      for (int yi = 0; yi < (1 << H); yi++) begin
        x1 = H'(xi); y1 = H'(yi);
        xv = longint'(xi) << H;
        yv = longint'(yi) << H;
        s  = longint'(1) << (2 * N - 1);
        for (int i = H; i < N; i++)
          for (int j = H; j < N; j++) begin
            b = bit1(xv, i) & bit1(yv, j);
            if ((i == N - 1) != (j == N - 1)) b = b ^ 1;
            s += b << (i + j);
          end
        cm3 = 0; cm4 = 0;
        #1;
        checks++;
        if (p !== (N+1)'(bits(s >> (N - 1), 0, N + 1))) begin
          failures++;
          if (failures < 10) $display("FAIL CM1 x1=%h y1=%h p=%b", x1, y1, p);
        end
        cm3 = 1;
        #1;
        checks++;
        if (p[N:1] !== N'(sx(xi, H) * sx(yi, H))) begin
          failures++;
          if (failures < 10) $display("FAIL CM3 x1=%h y1=%h p=%b", x1, y1, p);
        end
        cm3 = 0; cm4 = 1;
        #1;
        checks++;
        if (p[N:1] !== N'(bw_ref(N, 3, xv, yv))) begin
          failures++;
          if (failures < 10) $display("FAIL CM4 x1=%h y1=%h p=%b", x1, y1, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

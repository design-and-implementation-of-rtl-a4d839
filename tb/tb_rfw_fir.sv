// tb_rfw_fir: self-checking test of the reconfigurable FIR filter (35 taps,
// 8-bit data, default parameters).
//
// Phase 1 loads a 35-tap windowed-sinc low-pass filter and runs a generated
// 1000-sample speech-like signal (voiced harmonics with a varying envelope
// plus noise) in each of the four modes, with random idle gaps between
// samples. Phase 2 uses random coefficients and random samples and changes
// the mode on every sample. Every output is compared, one cycle after its
// sample, with a model built from the multiplier's arithmetic reference and
// the documented operand packing. For phase 1 the test also reports the
// signal-to-noise ratio of each mode against the exact product sum.
module tb_rfw_fir;
  import rfw_pkg::*;
  import rfw_ref_pkg::*;

  localparam int TAPS = 35;
  localparam int N    = 8;
  localparam int H    = N / 2;
  localparam int OW   = N + $clog2(TAPS) + 1;

  int checks = 0, failures = 0;
  int n_mode[4];

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cm_e                    mode;
  logic                   coef_we = 0;
  logic [$clog2(TAPS)-1:0] coef_addr;
  logic [N-1:0]           coef_data;
  logic                   in_valid = 0;
  logic [N-1:0]           sample;
  logic                   out_valid;
  logic [OW-1:0]          y;

  rfw_fir dut (.clk, .rst_n, .mode, .coef_we, .coef_addr, .coef_data, .in_valid,
               .sample, .out_valid, .y);

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog timeout");
    $finish;
  end

  longint hist [TAPS];   // hist[0] newest
  longint hc   [TAPS];

  function automatic longint hi4(input longint v);
    return sx(bits(v, H, H), H);
  endfunction

  function automatic longint fir_ref(input int op);
    longint acc = 0, xp, yp, p;
    int     pairs = (TAPS + 1) / 2;
    if (op == 0) begin
      for (int i = 0; i < TAPS; i++) acc += sx(booth_ref(N, 0, hist[i], hc[i]), N);
    end else if (op == 2) begin
      for (int i = 0; i < TAPS; i++) acc += hi4(hist[i]) * hi4(hc[i]);
    end else begin
      for (int m = 0; m < pairs; m++) begin
        longint sa, sb, ha, hb;
        sa = bits(hist[2*m], H, H);
        ha = bits(hc[2*m], H, H);
        sb = (2*m + 1 < TAPS) ? bits(hist[2*m+1], H, H) : 0;
        hb = (2*m + 1 < TAPS) ? bits(hc[2*m+1], H, H) : 0;
        xp = (sa << H) | sb;
        yp = (hb << H) | ha;
        p  = booth_ref(N, op, xp, yp);
        if (op == 1) acc += sx(bits(p, 0, H), H) + sx(bits(p, H, H), H);
        else         acc += sx(p, N);
      end
    end
    return acc;
  endfunction

  function automatic longint exact_sum();
    longint acc = 0;
    for (int i = 0; i < TAPS; i++) acc += sx(hist[i], N) * sx(hc[i], N);
    return acc;
  endfunction

  task automatic write_coef(input int a, input longint v);
    @(negedge clk);
    coef_we   = 1;
    coef_addr = a[$clog2(TAPS)-1:0];
    coef_data = v[N-1:0];
    hc[a]     = v & 8'hff;
    @(negedge clk);
    coef_we = 0;
  endtask

  // drive one sample, check the output one cycle later; returns the output
  task automatic push(input cm_e m, input longint s, output longint got, output longint exp);
    @(negedge clk);
    for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0]  = s & 8'hff;
    mode     = m;
    sample   = s[N-1:0];
    in_valid = 1;
    exp      = sx(fir_ref(int'(m)), OW);
    @(negedge clk);
    in_valid = 0;
    got      = sx(longint'(y), OW);
    checks++;
    n_mode[int'(m)]++;
    if (!out_valid || got != exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL mode=%0d s=%0d y=%0d exp=%0d ov=%0b", m, sx(s, N), got, exp, out_valid);
    end
    if ($urandom_range(3) == 0) repeat ($urandom_range(3)) @(negedge clk);
  endtask

  real sig [1000];

  initial begin
    longint got, exp, ex;
    real    ps, pn [4], scale, w, env, v;
    for (int i = 0; i < TAPS; i++) begin hist[i] = 0; hc[i] = 0; end
    mode = CM1;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 35-tap Hamming-windowed sinc low-pass, cutoff 0.2 fs, Q7 coefficients
    for (int i = 0; i < TAPS; i++) begin
      automatic real t = real'(i - (TAPS - 1) / 2);
      automatic real hv = (t == 0.0) ? 0.4 : $sin(2.0 * 3.14159265 * 0.2 * t) / (3.14159265 * t);
      hv = hv * (0.54 - 0.46 * $cos(2.0 * 3.14159265 * i / (TAPS - 1)));
      write_coef(i, longint'($rtoi(hv * 127.0 * 2.0 + ((hv >= 0) ? 0.5 : -0.5))));
    end

    // speech-like test signal
    for (int k = 0; k < 1000; k++) begin
      env = 0.5 + 0.45 * $sin(2.0 * 3.14159265 * k / 400.0);
      v = 0.0;
      for (int hm = 1; hm <= 6; hm++)
        v += $sin(2.0 * 3.14159265 * 0.013 * hm * k + hm) / hm;
      sig[k] = env * v * 0.45 + (real'($urandom_range(1000)) - 500.0) / 500.0 * 0.05;
      if (sig[k] > 0.99) sig[k] = 0.99;
      if (sig[k] < -0.99) sig[k] = -0.99;
    end

    for (int m = 0; m < 4; m++) begin
      ps = 0.0;
      pn[m] = 0.0;
      for (int i = 0; i < TAPS; i++) hist[i] = 0;
      for (int k = 0; k < 1000 + TAPS; k++) begin
        automatic longint s = (k < 1000) ? longint'($rtoi(sig[k] * 128.0)) : 0;
        push(cm_e'(m), s, got, exp);
        ex = exact_sum();
        // scale each mode's output back to the exact product scale
        scale = (m == 0 || m == 2) ? 256.0 : 4096.0;
        w = real'(got) * scale;
        ps += real'(ex) * real'(ex);
        pn[m] += (w - real'(ex)) * (w - real'(ex));
      end
      if (m == 2) $display("mode CM%0d (4-bit operands, exact products) SNR %0.1f dB", m + 1,
                           10.0 * $log10(ps / pn[m]));
      else        $display("mode CM%0d SNR %0.1f dB", m + 1, 10.0 * $log10(ps / pn[m]));
    end

    // phase 2: random coefficients, random samples, mode changes per sample
    for (int i = 0; i < TAPS; i++) write_coef(i, longint'($urandom()));
    for (int k = 0; k < 4000; k++)
      push(cm_e'($urandom_range(3)), longint'($urandom()), got, exp);

    for (int m = 0; m < 4; m++) begin
      $display("mode CM%0d samples %0d", m + 1, n_mode[m]);
      if (n_mode[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

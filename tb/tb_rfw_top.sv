// tb_rfw_top: end-to-end test of rfw_top at its default sizes (8-bit Booth
// multiplier, 16-bit pipelined Baugh-Wooley multiplier, 35-tap 8-bit FIR).
//
// The three channels run at the same time from separate processes:
//  - Booth: an operation on most cycles, random mode, product checked against
//    the arithmetic reference exactly two cycles after its operands;
//  - Baugh-Wooley: an operation on most cycles, mode runs with random
//    switches, operands biased towards zero halves so that every MUL bypass
//    (substituted output), the frozen ADD1 registers and the SCC1 hold element
//    are used; product checked exactly three cycles after its operands;
//  - FIR: coefficients written through the coefficient port, then samples
//    in all four modes with mode switches; every output checked one cycle
//    after its sample against a model of the tap sum.
// The test counts every mode of every channel, every mode switch, each bypass,
// ADD1 freezes, L holds and coefficient writes, and counts a failure for any
// mechanism that never occurred.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour
// they expect is the published arithmetic of the multipliers, with this
// design's choices where the header of the module under test names them.
module tb_rfw_top;
  import rfw_pkg::*;
  import rfw_ref_pkg::*;

  localparam int TAPS = 35;
  localparam int FN   = 8;
  localparam int FOW  = FN + $clog2(TAPS) + 1;

  int checks = 0, failures = 0;
  int nb_mode[4], nw_mode[4], nf_mode[4];
  int nb_sw = 0, nw_sw = 0, nf_sw = 0;
  int n_g1 = 0, n_g2 = 0, n_g3 = 0, n_hold = 0, n_l = 0, n_coef = 0;
  bit b_done = 0, w_done = 0, f_done = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        b_in_valid = 0, b_out_valid;
  cm_e         b_op = CM1;
  logic [7:0]  b_x = 0, b_y = 0, b_p;
  logic        w_in_valid = 0, w_out_valid;
  cm_e         w_op = CM1;
  logic [15:0] w_x = 0, w_y = 0, w_p;
  cm_e         f_mode = CM1;
  logic        f_coef_we = 0, f_in_valid = 0, f_out_valid;
  logic [5:0]  f_coef_addr = 0;
  logic [7:0]  f_coef_data = 0, f_sample = 0;
  logic [FOW-1:0] f_y;

  rfw_top dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- Booth channel ----------------
  logic [7:0] eb [3];
  logic       evb [3];

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (b_out_valid !== evb[2]) begin
        failures++;
        $display("FAIL booth valid timing");
      end
      if (evb[2]) begin
        checks++;
        if (b_p !== eb[2]) begin
          failures++;
          if (failures < 20) $display("FAIL booth got %h exp %h", b_p, eb[2]);
        end
      end
    end
  end

  initial begin
    automatic int m = 0, last = 0;
    for (int i = 0; i < 3; i++) begin evb[i] = 0; eb[i] = 0; end
    @(posedge rst_n);
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      evb[2] = evb[1]; eb[2] = eb[1];
      evb[1] = evb[0]; eb[1] = eb[0];
      b_in_valid = ($urandom % 6) != 0;
      m = ($urandom % 4 == 0) ? $urandom % 4 : last;
      b_op = cm_e'(m);
      b_x  = 8'($urandom);
      b_y  = 8'($urandom);
      evb[0] = b_in_valid;
      eb[0]  = 8'(booth_ref(8, m, b_x, b_y));
      if (b_in_valid) begin
        nb_mode[m]++;
        if (m != last) nb_sw++;
        last = m;
      end
    end
    @(negedge clk);
    b_in_valid = 0;
    repeat (3) begin
      evb[2] = evb[1]; eb[2] = eb[1];
      evb[1] = evb[0]; eb[1] = eb[0];
      evb[0] = 0;
      @(negedge clk);
    end
    b_done = 1;
  end

  // ---------------- Baugh-Wooley channel ----------------
  logic [15:0] ew [4];
  logic        evw [4];

  function automatic logic [15:0] pick(input int sel);
    logic [15:0] v = 16'($urandom);
    if (sel == 1) v = v & 16'h00ff;
    if (sel == 2) v = v & 16'hff00;
    if (sel == 3) v = 0;
    return v;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (w_out_valid !== evw[3]) begin
        failures++;
        $display("FAIL bw valid timing");
      end
      if (evw[3]) begin
        checks++;
        if (w_p !== ew[3]) begin
          failures++;
          if (failures < 20) $display("FAIL bw got %h exp %h", w_p, ew[3]);
        end
      end
      if (dut.u_bw.g_m1) n_g1++;
      if (dut.u_bw.g_m2) n_g2++;
      if (dut.u_bw.g_m3) n_g3++;
      if (dut.u_bw.v_s2 && !dut.u_bw.t_s2[3]) n_hold++;
      if (dut.u_bw.g_m1 && dut.u_bw.scc1_hold != dut.u_bw.scc1) n_l++;
    end
  end

  initial begin
    automatic int m = 0, last = 0;
    for (int i = 0; i < 4; i++) begin evw[i] = 0; ew[i] = 0; end
    @(posedge rst_n);
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      evw[3] = evw[2]; ew[3] = ew[2];
      evw[2] = evw[1]; ew[2] = ew[1];
      evw[1] = evw[0]; ew[1] = ew[0];
      w_in_valid = ($urandom % 8) != 0;
      m = (k / 9) % 4;
      if ($urandom % 5 == 0) m = $urandom % 4;
      w_op = cm_e'(m);
      w_x  = pick(($urandom % 3 == 0) ? $urandom % 4 : 0);
      w_y  = pick(($urandom % 3 == 0) ? $urandom % 4 : 0);
      evw[0] = w_in_valid;
      ew[0]  = 16'(bw_ref(16, m, w_x, w_y));
      if (w_in_valid) begin
        nw_mode[m]++;
        if (m != last) nw_sw++;
        last = m;
      end
    end
    @(negedge clk);
    w_in_valid = 0;
    repeat (4) begin
      evw[3] = evw[2]; ew[3] = ew[2];
      evw[2] = evw[1]; ew[2] = ew[1];
      evw[1] = evw[0]; ew[1] = ew[0];
      evw[0] = 0;
      @(negedge clk);
    end
    w_done = 1;
  end

  // ---------------- FIR channel ----------------
  longint hist [TAPS];
  longint hc   [TAPS];

  function automatic longint fir_ref(input int op);
    longint acc = 0, xp, yp, p;
    if (op == 0) begin
      for (int i = 0; i < TAPS; i++) acc += sx(booth_ref(8, 0, hist[i], hc[i]), 8);
    end else if (op == 2) begin
      for (int i = 0; i < TAPS; i++) acc += sx(bits(hist[i], 4, 4), 4) * sx(bits(hc[i], 4, 4), 4);
    end else begin
      for (int m = 0; m < (TAPS + 1) / 2; m++) begin
        xp = (bits(hist[2*m], 4, 4) << 4) | ((2*m + 1 < TAPS) ? bits(hist[2*m+1], 4, 4) : 0);
        yp = (((2*m + 1 < TAPS) ? bits(hc[2*m+1], 4, 4) : 0) << 4) | bits(hc[2*m], 4, 4);
        p  = booth_ref(8, op, xp, yp);
        if (op == 1) acc += sx(bits(p, 0, 4), 4) + sx(bits(p, 4, 4), 4);
        else         acc += sx(p, 8);
      end
    end
    return acc;
  endfunction

  initial begin
    automatic int m = 0, last = 0;
    longint exp, got;
    for (int i = 0; i < TAPS; i++) begin hist[i] = 0; hc[i] = 0; end
    @(posedge rst_n);
    for (int i = 0; i < TAPS; i++) begin
      @(negedge clk);
      f_coef_we   = 1;
      f_coef_addr = 6'(i);
      f_coef_data = 8'($urandom);
      hc[i]       = longint'(f_coef_data);
      n_coef++;
    end
    @(negedge clk);
    f_coef_we = 0;
    for (int k = 0; k < 1500; k++) begin
      @(negedge clk);
      m = ((k % 50) == 0) ? (k / 50) % 4 : last;
      if ($urandom % 20 == 0) m = $urandom % 4;
      f_mode     = cm_e'(m);
      f_sample   = 8'($urandom);
      f_in_valid = 1;
      for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = longint'(f_sample);
      exp = sx(fir_ref(m), FOW);
      nf_mode[m]++;
      if (m != last) nf_sw++;
      last = m;
      @(negedge clk);
      f_in_valid = 0;
      got = sx(longint'(f_y), FOW);
      checks++;
      if (!f_out_valid || got != exp) begin
        failures++;
        if (failures < 20) $display("FAIL fir mode %0d got %0d exp %0d", m, got, exp);
      end
    end
    f_done = 1;
  end

  // ---------------- reset and summary ----------------
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (b_done && w_done && f_done);
    $display("booth modes %0d %0d %0d %0d, switches %0d", nb_mode[0], nb_mode[1], nb_mode[2], nb_mode[3], nb_sw);
    $display("bw    modes %0d %0d %0d %0d, switches %0d", nw_mode[0], nw_mode[1], nw_mode[2], nw_mode[3], nw_sw);
    $display("bw    bypass MUL1 %0d MUL2 %0d MUL3 %0d, ADD1 frozen %0d, L hold %0d", n_g1, n_g2, n_g3, n_hold, n_l);
    $display("fir   modes %0d %0d %0d %0d, switches %0d, coefficient writes %0d", nf_mode[0], nf_mode[1], nf_mode[2], nf_mode[3], nf_sw, n_coef);
    for (int i = 0; i < 4; i++) begin
      checks += 3;
      if (nb_mode[i] == 0) failures++;
      if (nw_mode[i] == 0) failures++;
      if (nf_mode[i] == 0) failures++;
    end
    checks += 9;
    if (nb_sw == 0) failures++;
    if (nw_sw == 0) failures++;
    if (nf_sw == 0) failures++;
    if (n_g1 == 0) failures++;
    if (n_g2 == 0) failures++;
    if (n_g3 == 0) failures++;
    if (n_hold == 0) failures++;
    if (n_l == 0) failures++;
    if (n_coef == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

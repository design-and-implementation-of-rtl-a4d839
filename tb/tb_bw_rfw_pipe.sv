// tb_bw_rfw_pipe: self-checking test of the pipelined Baugh-Wooley multiplier.
//
// Two instances, n = 16 (default) and n = 8, receive one operation per cycle
// (with idle gaps) in random modes; operands are biased so that zero halves
// occur often and every power-saving bypass is exercised. Each result is
// compared with the arithmetic reference model and must appear exactly 3
// cycles after its operands. For n = 8 the substituted module outputs are
// compared with the published constants (111100000, 001111, 010001/010010).
// The test counts each mode, each bypass and each frozen ADD1 cycle, and fails
// if one of them never occurred.
module tb_bw_rfw_pipe;
  import rfw_pkg::*;
  import rfw_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_mode[4];
  int n_g1 = 0, n_g2 = 0, n_g3 = 0, n_hold = 0, n_l = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        iv;
  cm_e         op;
  logic [15:0] x16, y16, p16;
  logic [7:0]  x8, y8, p8;
  logic        ov16, ov8;

  bw_rfw_pipe #(.N(16)) dut16 (.clk, .rst_n, .in_valid(iv), .op, .x(x16), .y(y16), .out_valid(ov16), .p(p16));
  bw_rfw_pipe #(.N(8))  dut8  (.clk, .rst_n, .in_valid(iv), .op, .x(x8),  .y(y8),  .out_valid(ov8),  .p(p8));

  // expected results: operands driven before edge k leave the output register
  // at edge k+2 and are sampled by the checker at edge k+3
  logic [15:0] e16 [4];
  logic [7:0]  e8  [4];
  logic        ev  [4];
  int          cyc = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] pick(input int w, input int sel);
    logic [15:0] v;
    int h;
    h = w / 2;
    v = 16'($urandom);
    if (sel == 1) v = v & ((16'(1) << h) - 1);       // upper half zero
    if (sel == 2) v = v & ~((16'(1) << h) - 1);      // lower half zero
    if (sel == 3) v = 0;
    return v;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      // output check
      checks += 2;
      if (ov16 !== ev[3] || ov8 !== ev[3]) begin
        failures++;
        $display("FAIL valid timing at cycle %0d", cyc);
      end
      if (ev[3]) begin
        checks += 2;
        if (p16 !== e16[3]) begin
          failures++;
          if (failures < 20) $display("FAIL n16 got %h exp %h", p16, e16[3]);
        end
        if (p8 !== e8[3]) begin
          failures++;
          if (failures < 20) $display("FAIL n8 got %h exp %h", p8, e8[3]);
        end
      end
      // observe the power-saving mechanisms
      if (dut16.g_m1) n_g1++;
      if (dut16.g_m2) n_g2++;
      if (dut16.g_m3) n_g3++;
      if (dut16.v_s2 && !dut16.t_s2[3]) n_hold++;
      if (dut16.g_m1 && dut16.scc1_hold != dut16.scc1) n_l++;
      if (dut8.g_m3) begin
        checks++;
        if (dut8.e3 !== 9'b111100000) begin failures++; $display("FAIL n8 MUL3 substitute"); end
      end
      if (dut8.g_m2) begin
        checks++;
        if (dut8.e2 !== 6'b001111) begin failures++; $display("FAIL n8 MUL2 substitute"); end
      end
      if (dut8.g_m1) begin
        checks++;
        if (dut8.e1 !== ((dut8.xy_mid_s2 | dut8.km2_cu) ? 6'b010010 : 6'b010001)) begin
          failures++; $display("FAIL n8 MUL1 substitute");
        end
      end
    end
  end

  initial begin
    int m, sx_, sy_;
    iv = 0; op = CM1; x16 = 0; y16 = 0; x8 = 0; y8 = 0;
    ev[0] = 0; ev[1] = 0; ev[2] = 0; ev[3] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 60000; k++) begin
      @(negedge clk);
      // shift expectations (they describe what leaves the pipeline 3 edges later)
      ev[3] = ev[2]; e16[3] = e16[2]; e8[3] = e8[2];
      ev[2] = ev[1]; e16[2] = e16[1]; e8[2] = e8[1];
      ev[1] = ev[0]; e16[1] = e16[0]; e8[1] = e8[0];
      iv = ($urandom % 8) != 0;
      // runs of the same mode, as a workload would issue them
      m = (k / 7) % 4;
      if ($urandom % 5 == 0) m = $urandom % 4;
      op  = cm_e'(m);
      sx_ = ($urandom % 3 == 0) ? $urandom % 4 : 0;
      sy_ = ($urandom % 3 == 0) ? $urandom % 4 : 0;
      x16 = pick(16, sx_); y16 = pick(16, sy_);
      x8  = 8'(pick(8, sx_)); y8 = 8'(pick(8, sy_));
      ev[0]  = iv;
      e16[0] = 16'(bw_ref(16, m, x16, y16));
      e8[0]  = 8'(bw_ref(8, m, x8, y8));
      if (iv) n_mode[m]++;
    end
    @(negedge clk);
    iv = 0;
    ev[3] = ev[2]; e16[3] = e16[2]; e8[3] = e8[2];
    ev[2] = ev[1]; e16[2] = e16[1]; e8[2] = e8[1];
    ev[1] = ev[0]; e16[1] = e16[0]; e8[1] = e8[0];
    ev[0] = 0;
    repeat (4) begin
      @(negedge clk);
      ev[3] = ev[2]; e16[3] = e16[2]; e8[3] = e8[2];
      ev[2] = ev[1]; e16[2] = e16[1]; e8[2] = e8[1];
      ev[1] = ev[0]; e16[1] = e16[0]; e8[1] = e8[0];
      ev[0] = 0;
    end
    $display("modes CM1..CM4: %0d %0d %0d %0d", n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    $display("bypass MUL1 %0d MUL2 %0d MUL3 %0d, ADD1 frozen %0d, L holding a differing value %0d",
             n_g1, n_g2, n_g3, n_hold, n_l);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_mode[i] == 0) failures++;
    end
    checks += 4;
    if (n_g1 == 0 || n_g2 == 0 || n_g3 == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bw_rfw_pipe_sizes: the pipelined Baugh-Wooley multiplier at n = 24 and
// n = 32, the larger sizes besides the default 16.
//
// Both instances receive one operation per cycle (with idle gaps) in runs of
// random modes; operands are biased so that zero halves, and so every bypass,
// occur. Each result is compared with the arithmetic reference model exactly
// three cycles after its operands. Stimulus, reference model and checks are
// this testbench's own. The test counts each mode and the bypasses of the
// n = 32 instance, and fails if one never occurred.
module tb_bw_rfw_pipe_sizes;
  import rfw_pkg::*;
  import rfw_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_mode[4];
  int n_g1 = 0, n_g2 = 0, n_g3 = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        iv = 0;
  cm_e         op = CM1;
  logic [23:0] x24 = 0, y24 = 0, p24;
  logic [31:0] x32 = 0, y32 = 0, p32;
  logic        ov24, ov32;

  bw_rfw_pipe #(.N(24)) dut24 (.clk, .rst_n, .in_valid(iv), .op, .x(x24), .y(y24), .out_valid(ov24), .p(p24));
  bw_rfw_pipe #(.N(32)) dut32 (.clk, .rst_n, .in_valid(iv), .op, .x(x32), .y(y32), .out_valid(ov32), .p(p32));

  logic [23:0] e24 [4];
  logic [31:0] e32 [4];
  logic        ev  [4];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pick(input int w, input int sel);
    logic [31:0] v = $urandom;
    logic [31:0] lo = (32'(1) << (w / 2)) - 1;
    if (sel == 1) v = v & lo;
    if (sel == 2) v = v & ~lo;
    if (sel == 3) v = 0;
    return v;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      checks += 2;
      if (ov24 !== ev[3] || ov32 !== ev[3]) begin
        failures++;
        $display("FAIL valid timing");
      end
      if (ev[3]) begin
        checks += 2;
        if (p24 !== e24[3]) begin
          failures++;
          if (failures < 20) $display("FAIL n24 got %h exp %h", p24, e24[3]);
        end
        if (p32 !== e32[3]) begin
          failures++;
          if (failures < 20) $display("FAIL n32 got %h exp %h", p32, e32[3]);
        end
      end
      if (dut32.g_m1) n_g1++;
      if (dut32.g_m2) n_g2++;
      if (dut32.g_m3) n_g3++;
    end
  end

  task automatic shift();
    ev[3] = ev[2]; e24[3] = e24[2]; e32[3] = e32[2];
    ev[2] = ev[1]; e24[2] = e24[1]; e32[2] = e32[1];
    ev[1] = ev[0]; e24[1] = e24[0]; e32[1] = e32[0];
  endtask

  initial begin
    automatic int m = 0, sx_ = 0, sy_ = 0;
    for (int i = 0; i < 4; i++) begin ev[i] = 0; e24[i] = 0; e32[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 30000; k++) begin
      @(negedge clk);
      shift();
      iv = ($urandom % 8) != 0;
      m = (k / 7) % 4;
      if ($urandom % 5 == 0) m = $urandom % 4;
      op  = cm_e'(m);
      sx_ = ($urandom % 3 == 0) ? $urandom % 4 : 0;
      sy_ = ($urandom % 3 == 0) ? $urandom % 4 : 0;
      x32 = pick(32, sx_); y32 = pick(32, sy_);
      x24 = 24'(pick(24, sx_)); y24 = 24'(pick(24, sy_));
      ev[0]  = iv;
      e24[0] = 24'(bw_ref(24, m, longint'(x24), longint'(y24)));
      e32[0] = 32'(bw_ref(32, m, longint'(x32), longint'(y32)));
      if (iv) n_mode[m]++;
    end
    @(negedge clk);
    iv = 0;
    repeat (5) begin
      shift();
      ev[0] = 0;
      @(negedge clk);
    end
    $display("modes CM1..CM4: %0d %0d %0d %0d; n=32 bypass MUL1 %0d MUL2 %0d MUL3 %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_g1, n_g2, n_g3);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_mode[i] == 0) failures++;
    end
    checks += 3;
    if (n_g1 == 0) failures++;
    if (n_g2 == 0) failures++;
    if (n_g3 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

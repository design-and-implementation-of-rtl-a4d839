// bw_rfw_pipe: power-efficient pipelined reconfigurable fixed-width
// Baugh-Wooley multiplier.
//
// An n x n Baugh-Wooley array that keeps the n+1 most significant columns
// (fixed width, w = 1, adaptive compensation) is split into three modules:
// MUL1 (X1*Y0 quadrant), MUL2 (X0*Y1) and MUL3 (X1*Y1). A decoder turns the
// mode into the one-hot t[3:0] that reconfigures them (see rfw_pkg):
//   CM1  p = X*Y / 2^n fixed width: ADD1 = MUL1 + MUL2 (column n-1 dropped
//        after the add), ADD2 = ADD1 + MUL3
//   CM2  p = {X0*Y1, X1*Y0}, two n/2-bit fixed-width products from MUL2, MUL1
//   CM3  p = X1*Y1 exact, from MUL3
//   CM4  p = {X3*Y3, X2*Y2}, two exact n/4 x n/4 products from MUL3
// A stage-2 multiplexer chooses MUL3 or the {MUL2, MUL1} concatenation.
//
// Pipeline (all registers on clk, synchronous active-low reset):
//   stage 1  decoder, zero detection of X1, X0, Y1, Y0, gate decisions;
//            registered into separate (duplicated) operand registers for
//            MUL1, MUL2 and MUL3, each with its own enable
//   stage 2  MUL1/MUL2/MUL3, SCC, CU, hold element L, substitution muxes,
//            output mux; registered into the ADD1 input registers (enabled
//            only in CM1) and the mux register
//   stage 3  ADD1, ADD2 with zero input (mux value ANDed with t[3]), final
//            selection; registered into p
// in_valid -> out_valid latency is 3 clock cycles, one operation per cycle.
//
// Power saving (modelled as register enables; a clock-gating cell per enable
// group gives the same function):
//  - a MUL's operand register loads only when its result is needed: MUL1/MUL2
//    in CM1 and CM2, MUL3 in CM1, CM3, CM4; ADD1's registers only in CM1.
//  - in CM1 a MUL whose operand half is zero (MUL1: X1 or Y0, MUL2: X0 or
//    Y1, MUL3: X1 or Y1) is not loaded and its known output is substituted:
//    MUL3 -> ones in columns 3n/2..2n-1, MUL2 -> 2^(n/2)-1,
//    MUL1 -> 2^(n/2) + 1 + (x[n/2-1]y[n/2-1] | Km2).
//  - CU: when MUL2 is frozen, MUL1's SCC1 sees Km2 = 1 (its true value).
//  - L: while MUL1 is frozen its SCC1 input holds the last value.
// The substitute values, gating rules, CU, L and the ADD1/ADD2 schemes follow
// the published structure; the exact register boundaries, the output
// register, the reset and the stage-1 register for x[n/2-1]y[n/2-1] are this
// implementation's choices.
module bw_rfw_pipe
  import rfw_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  cm_e          op,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic         out_valid,
  output logic [N-1:0] p
);
  localparam int unsigned H = N / 2;

  // ---------------- stage 1: decode, zero detection, gate decisions
  logic [3:0] t;
  bw_dec u_dec (.op(op), .t(t));

  logic zx1, zx0, zy1, zy0;
  logic z_m1, z_m2, z_m3;          // CM1 zero-input bypass conditions
  logic en_m1, en_m2, en_m3;
  always_comb begin
    zx1   = (x[N-1:H] == '0);
    zx0   = (x[H-1:0] == '0);
    zy1   = (y[N-1:H] == '0);
    zy0   = (y[H-1:0] == '0);
    z_m1  = t[3] & (zx1 | zy0);
    z_m2  = t[3] & (zx0 | zy1);
    z_m3  = t[3] & (zx1 | zy1);
    en_m1 = in_valid & (t[2] | (t[3] & ~z_m1));
    en_m2 = in_valid & (t[2] | (t[3] & ~z_m2));
    en_m3 = in_valid & (t[1] | t[0] | (t[3] & ~z_m3));
  end

  // gated operand registers (duplicated per multiplier module)
  logic [H-1:0] m1_x1, m1_y0, m2_x0, m2_y1, m3_x1, m3_y1;
  logic         m1_xm, m1_cm2, m2_cm2, m3_cm3, m3_cm4;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {m1_x1, m1_y0, m1_xm, m1_cm2} <= '0;
      {m2_x0, m2_y1, m2_cm2}        <= '0;
      {m3_x1, m3_y1, m3_cm3, m3_cm4} <= '0;
    end else begin
      if (en_m1) begin
        m1_x1  <= x[N-1:H];
        m1_y0  <= y[H-1:0];
        m1_xm  <= x[H-1];
        m1_cm2 <= t[2];
      end
      if (en_m2) begin
        m2_x0  <= x[H-1:0];
        m2_y1  <= y[N-1:H];
        m2_cm2 <= t[2];
      end
      if (en_m3) begin
        m3_x1  <= x[N-1:H];
        m3_y1  <= y[N-1:H];
        m3_cm3 <= t[1];
        m3_cm4 <= t[0];
      end
    end
  end

  // control registers (always loaded)
  logic [3:2] t_s2;
  logic       v_s2, g_m1, g_m2, g_m3, xy_mid_s2;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t_s2 <= '0;
      {v_s2, g_m1, g_m2, g_m3, xy_mid_s2} <= '0;
    end else begin
      t_s2      <= t[3:2];
      v_s2      <= in_valid;
      g_m1      <= in_valid & z_m1;
      g_m2      <= in_valid & z_m2;
      g_m3      <= in_valid & z_m3;
      xy_mid_s2 <= x[H-1] & y[H-1];
    end
  end

  // ---------------- stage 2: multiplier modules
  logic [H+1:0] p1, p2;
  logic [N:0]   p3;
  logic         km1, km2, km2_cu, scc1, scc2, scc1_l, scc1_hold;

  assign km2_cu = g_m2 | km2;                         // CU
  rfw_scc u_scc (.km1(km1), .km2(km2_cu), .cm1(t_s2[3]), .sub(t_s2[2]),
                 .scc1(scc1), .scc2(scc2));

  // L: transparent while MUL1 works, holds while it is frozen
  assign scc1_l = g_m1 ? scc1_hold : scc1;
  always_ff @(posedge clk) begin
    if (!rst_n) scc1_hold <= 1'b0;
    else        scc1_hold <= scc1_l;
  end

  bw_mul1 #(.N(N)) u_mul1 (.x1(m1_x1), .y0(m1_y0), .x_mid(m1_xm), .cm2(m1_cm2),
                           .scc1(scc1_l), .p(p1), .km1(km1));
  bw_mul2 #(.N(N)) u_mul2 (.x0(m2_x0), .y1(m2_y1), .cm2(m2_cm2),
                           .scc2(scc2), .p(p2), .km2(km2));
  bw_mul3 #(.N(N)) u_mul3 (.x1(m3_x1), .y1(m3_y1), .cm3(m3_cm3), .cm4(m3_cm4), .p(p3));

  // substitution of the known outputs of frozen modules
  logic [H+1:0] e1, e2;
  logic [N:0]   e3;
  logic [N-1:0] mux;
  always_comb begin
    e1  = g_m1 ? ((H+2)'(1) << H) + (H+2)'(1) + (H+2)'(xy_mid_s2 | km2_cu) : p1;
    e2  = g_m2 ? ((H+2)'(1) << H) - (H+2)'(1) : p2;
    // e3[0] is column n-1 of MUL3, always zero and not used
    e3  = g_m3 ? (((N+1)'(1) << H) - (N+1)'(1)) << (H + 1) : p3;
    mux = t_s2[2] ? {e2[H:1], e1[H:1]} : e3[N:1];
  end

  // stage-3 registers: ADD1 inputs loaded only in CM1
  logic [H+1:0] a1, a2;
  logic [N-1:0] mux_s3;
  logic         t3_s3, v_s3;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {a1, a2} <= '0;
      mux_s3   <= '0;
      {t3_s3, v_s3} <= '0;
    end else begin
      if (v_s2 && t_s2[3]) begin
        a1 <= e1;
        a2 <= e2;
      end
      mux_s3 <= mux;
      t3_s3  <= t_s2[3];
      v_s3   <= v_s2;
    end
  end

  // ---------------- stage 3: ADD1, ADD2, output selection
  logic [H+2:0] add1_full;
  logic [H+1:0] add1;
  logic [N-1:0] add2, res;
  always_comb begin
    add1_full = (H+3)'(a1) + (H+3)'(a2);
    add1      = add1_full[H+2:1];                    // drop column n-1 (bit 0)
    add2      = N'(add1) + (mux_s3 & {N{t3_s3}});    // zero input outside CM1
    res       = t3_s3 ? add2 : mux_s3;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p         <= '0;
      out_valid <= 1'b0;
    end else begin
      p         <= res;
      out_valid <= v_s3;
    end
  end

  // the stage-2 mux output never reaches ADD2 with a stale ADD1 in CM1
  a_add1_loaded: assert property (@(posedge clk) disable iff (!rst_n)
    (v_s2 && t_s2[3]) |=> (a1 == $past(e1) && a2 == $past(e2)));
endmodule

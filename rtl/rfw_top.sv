// rfw_top: the two reconfigurable fixed-width multipliers and the FIR filter
// application, side by side.
//
// Three independent channels share a clock and a synchronous active-low reset:
//  - Booth channel: booth_rfw_mult (n = BN, default 8) with registered
//    operands and a registered result. b_in_valid loads op/x/y; the product
//    appears on b_p with b_out_valid two cycles later. The operand register
//    loads only on b_in_valid, so idle cycles cause no switching in the array.
//  - Baugh-Wooley channel: bw_rfw_pipe (n = WN, default 16), 3-cycle latency,
//    one operation per cycle, with its own operand gating and bypasses.
//  - FIR channel: rfw_fir (TAPS = 35 taps, FN = 8 bits) built on Booth
//    multipliers, with a coefficient write port; one-cycle latency.
// Modes use the rfw_pkg encoding (CM1..CM4). The multipliers, their modes and
// the 35-tap 8-bit FIR configuration follow the document; the registers around
// the Booth multiplier and the grouping into one top are this design's
// choices.
module rfw_top
  import rfw_pkg::*;
#(
  parameter int unsigned BN   = 8,
  parameter int unsigned WN   = 16,
  parameter int unsigned TAPS = 35,
  parameter int unsigned FN   = 8,
  localparam int unsigned FOW = FN + $clog2(TAPS) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // Booth channel
  input  logic                    b_in_valid,
  input  cm_e                     b_op,
  input  logic [BN-1:0]           b_x,
  input  logic [BN-1:0]           b_y,
  output logic                    b_out_valid,
  output logic [BN-1:0]           b_p,
  // Baugh-Wooley channel
  input  logic                    w_in_valid,
  input  cm_e                     w_op,
  input  logic [WN-1:0]           w_x,
  input  logic [WN-1:0]           w_y,
  output logic                    w_out_valid,
  output logic [WN-1:0]           w_p,
  // FIR channel
  input  cm_e                     f_mode,
  input  logic                    f_coef_we,
  input  logic [$clog2(TAPS)-1:0] f_coef_addr,
  input  logic [FN-1:0]           f_coef_data,
  input  logic                    f_in_valid,
  input  logic [FN-1:0]           f_sample,
  output logic                    f_out_valid,
  output logic [FOW-1:0]          f_y
);
  cm_e           b_op_q;
  logic [BN-1:0] b_x_q, b_y_q, b_p_c;
  logic          b_v_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_v_q       <= 1'b0;
      b_out_valid <= 1'b0;
      b_op_q      <= CM1;
      b_x_q       <= '0;
      b_y_q       <= '0;
      b_p         <= '0;
    end else begin
      b_v_q       <= b_in_valid;
      b_out_valid <= b_v_q;
      if (b_in_valid) begin
        b_op_q <= b_op;
        b_x_q  <= b_x;
        b_y_q  <= b_y;
      end
      if (b_v_q) b_p <= b_p_c;
    end
  end

  booth_rfw_mult #(.N(BN)) u_booth (.op(b_op_q), .x(b_x_q), .y(b_y_q), .p(b_p_c));

  bw_rfw_pipe #(.N(WN)) u_bw (
    .clk, .rst_n, .in_valid(w_in_valid), .op(w_op), .x(w_x), .y(w_y),
    .out_valid(w_out_valid), .p(w_p)
  );

  rfw_fir #(.TAPS(TAPS), .N(FN)) u_fir (
    .clk, .rst_n, .mode(f_mode), .coef_we(f_coef_we), .coef_addr(f_coef_addr),
    .coef_data(f_coef_data), .in_valid(f_in_valid), .sample(f_sample),
    .out_valid(f_out_valid), .y(f_y)
  );
endmodule

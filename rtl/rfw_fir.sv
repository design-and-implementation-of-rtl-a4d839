// rfw_fir: direct-form FIR filter on reconfigurable fixed-width Booth
// multipliers, computing y(m) = sum_i h(i) * s(m-i) over TAPS taps.
//
// Every tap owns one N x N booth_rfw_mult. The shared mode input trades
// accuracy for power:
//   CM1  8-bit samples and coefficients, each tap gives the N-bit fixed-width
//        product s*h / 2^N; one tap per multiplier.
//   CM3  upper N/2 bits of sample and coefficient, exact N-bit product; one
//        tap per multiplier (the lower operand halves are fed as zeros).
//   CM2  upper N/2 bits; multiplier m serves taps 2m and 2m+1, packed as
//        X = {s(2m), s(2m+1)}, Y = {h(2m+1), h(2m)}, so that its two
//        fixed-width sub-products X1*Y0 and X0*Y1 are the two tap products
//        (scaled by 2^-(N/2)); they are sign-extended and added here.
//   CM4  same packing; the multiplier already returns the sum of the pair.
// In CM2/CM4 only ceil(TAPS/2) multipliers work; the others get zero
// operands. The tap products are added by a combinational adder tree.
// Interface: coefficients are written one per cycle through coef_we /
// coef_addr / coef_data. On in_valid the sample enters the delay line and,
// on the same clock edge, y is loaded with the output that includes it:
// out_valid follows in_valid by one cycle. The mode may change between
// samples. Synchronous active-low reset clears the delay line.
// The filter equation and the 35-tap, 8 x 8 configuration follow the
// application study; the filter structure, packing, operand choice and
// coefficient port are this design's choices.
module rfw_fir
  import rfw_pkg::*;
#(
  parameter int unsigned TAPS = 35,
  parameter int unsigned N    = 8,
  localparam int unsigned AW  = $clog2(TAPS),
  localparam int unsigned OW  = N + $clog2(TAPS) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cm_e           mode,
  input  logic          coef_we,
  input  logic [AW-1:0] coef_addr,
  input  logic [N-1:0]  coef_data,
  input  logic          in_valid,
  input  logic [N-1:0]  sample,
  output logic          out_valid,
  output logic [OW-1:0] y
);
  localparam int unsigned H     = N / 2;
  localparam int unsigned PAIRS = (TAPS + 1) / 2;

  logic [N-1:0] h    [TAPS];
  logic [N-1:0] line [TAPS];
  logic [N-1:0] nxt  [TAPS];

  always_ff @(posedge clk) begin
    if (coef_we && 32'(coef_addr) < TAPS) h[coef_addr] <= coef_data;
  end

  always_comb begin
    nxt[0] = sample;
    for (int i = 1; i < int'(TAPS); i++) nxt[i] = line[i-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(TAPS); i++) line[i] <= '0;
    end else if (in_valid) begin
      for (int i = 0; i < int'(TAPS); i++) line[i] <= nxt[i];
    end
  end

  logic pair_mode;
  assign pair_mode = (mode == CM2) || (mode == CM4);

  logic [N-1:0]  mx [TAPS];
  logic [N-1:0]  my [TAPS];
  logic [N-1:0]  mp [TAPS];
  logic [OW-1:0] contrib [TAPS];

  for (genvar m = 0; m < int'(TAPS); m++) begin : g_tap
    // operand selection
    always_comb begin
      logic [H-1:0] sa, sb, ha, hb;
      sa = nxt[m][N-1:H];
      ha = h[m][N-1:H];
      sb = '0;
      hb = '0;
      if (pair_mode) begin
        sa = (m < int'(PAIRS)) ? nxt[(2*m < int'(TAPS)) ? 2*m : 0][N-1:H] : '0;
        ha = (m < int'(PAIRS)) ? h[(2*m < int'(TAPS)) ? 2*m : 0][N-1:H]   : '0;
        sb = (2*m + 1 < int'(TAPS)) ? nxt[(2*m + 1 < int'(TAPS)) ? 2*m + 1 : 0][N-1:H] : '0;
        hb = (2*m + 1 < int'(TAPS)) ? h[(2*m + 1 < int'(TAPS)) ? 2*m + 1 : 0][N-1:H]   : '0;
        mx[m] = {sa, sb};
        my[m] = {hb, ha};
      end else if (mode == CM3) begin
        mx[m] = {sa, {H{1'b0}}};
        my[m] = {ha, {H{1'b0}}};
      end else begin
        mx[m] = nxt[m];
        my[m] = h[m];
      end
    end

    booth_rfw_mult #(.N(N)) u_mult (.op(mode), .x(mx[m]), .y(my[m]), .p(mp[m]));

    // sign-extended contribution of this multiplier
    always_comb begin
      if (mode == CM2)
        contrib[m] = OW'($signed(mp[m][H-1:0])) + OW'($signed(mp[m][N-1:H]));
      else
        contrib[m] = OW'($signed(mp[m]));
    end
  end

  logic [OW-1:0] acc;
  always_comb begin
    acc = '0;
    for (int m = 0; m < int'(TAPS); m++) acc = acc + contrib[m];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= acc;
    end
  end
endmodule

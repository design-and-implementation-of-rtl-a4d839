// tb_booth_rfw_mult: self-checking test of the reconfigurable Booth multiplier.
//
// Instance n = 8 is checked exhaustively in all four modes against the
// arithmetic reference model; instance n = 16 with random operands plus
// corner values. CM3 is also compared with the plain product of the upper
// halves, and CM1 with the exact product (error bound of a few LSBs).
//
// Stimulus, reference model and checks are this testbench's own; the behaviour
// they expect is the published arithmetic of the multipliers, with this
// design's choices where the header of the module under test names them.
module tb_booth_rfw_mult;
  import rfw_pkg::*;
  import rfw_ref_pkg::*;

  int checks = 0, failures = 0;
  int maxerr8 = 0;

  cm_e         op8, op16;
  logic [7:0]  x8, y8, p8;
  logic [15:0] x16, y16, p16;

  booth_rfw_mult #(.N(8))  dut8  (.op(op8),  .x(x8),  .y(y8),  .p(p8));
  booth_rfw_mult #(.N(16)) dut16 (.op(op16), .x(x16), .y(y16), .p(p16));

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input longint got, input longint exp, input int op,
                     input longint x, input longint y);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s op=%0d x=%h y=%h got=%h exp=%h", what, op, x, y, got, exp);
    end
  endtask

  initial begin
    longint e, err;
    for (int m = 0; m < 4; m++) begin
      for (int xi = 0; xi < 256; xi++) begin
        for (int yi = 0; yi < 256; yi++) begin
          op8 = cm_e'(m); x8 = 8'(xi); y8 = 8'(yi);
          #1;
          chk("n8", longint'(p8), booth_ref(8, m, xi, yi), m, xi, yi);
          if (m == 2) chk("n8 cm3 exact", longint'(p8), bits(sx(xi >> 4, 4) * sx(yi >> 4, 4), 0, 8), m, xi, yi);
          if (m == 0) begin
            e   = sx(longint'(p8), 8) * 256;
            err = e - sx(xi, 8) * sx(yi, 8);
            if (err < 0) err = -err;
            if (int'(err / 256) > maxerr8) maxerr8 = int'(err / 256);
          end
        end
      end
    end
    checks++;
    if (maxerr8 > 3) begin
      failures++;
      $display("FAIL CM1 n=8 error %0d LSB", maxerr8);
    end
    for (int k = 0; k < 200000; k++) begin
      op16 = cm_e'(k % 4);
      if (k < 16) begin
        x16 = (k & 1) ? 16'h8000 : 16'h7fff;
        y16 = (k & 2) ? 16'h8000 : 16'hffff;
      end else begin
        x16 = 16'($urandom);
        y16 = 16'($urandom);
      end
      #1;
      chk("n16", longint'(p16), booth_ref(16, k % 4, x16, y16), k % 4, x16, y16);
      if (k % 4 == 2) chk("n16 cm3 exact", longint'(p16), bits(sx(x16 >> 8, 8) * sx(y16 >> 8, 8), 0, 16), 2, x16, y16);
    end
    $display("CM1 n=8 max error %0d LSB", maxerr8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

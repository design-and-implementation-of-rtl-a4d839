// tb_booth_enc: exhaustive test of the radix-4 Booth encoder.
//
// For all eight triplets and both enable values the recoding bits are
// compared with the Booth digit d = -2*y[2i+1] + y[2i] + y[2i-1]: x1 selects
// |d| = 1, x2 selects |d| = 2, neg marks d < 0, and en = 0 forces all three
// to zero. Combinational; each vector settles for one time unit.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour
// they expect is the published arithmetic of the multipliers, with this
// design's choices where the header of the module under test names them.
module tb_booth_enc;
  int checks = 0, failures = 0;
  logic [2:0] trip;
  logic       en, neg, x1, x2;

  booth_enc dut (.trip, .en, .neg, .x1, .x2);

  initial begin
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int d;
    logic [2:0] exp;
    for (int e = 0; e < 2; e++) begin
      for (int t = 0; t < 8; t++) begin
        trip = 3'(t);
        en   = e[0];
        #1;
        d   = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
        exp = en ? {d < 0, d == 1 || d == -1, d == 2 || d == -2} : 3'b000;
        checks++;
        if ({neg, x1, x2} !== exp) begin
          failures++;
          $display("FAIL trip=%b en=%b got %b exp %b", trip, en, {neg, x1, x2}, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

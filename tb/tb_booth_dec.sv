// tb_booth_dec: checks the Booth multiplier's mode decoder against its table:
// CM1 -> CS = 0001, CM2 -> 0010, CM3 -> 0100, CM4 -> 1010. Combinational.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour
// they expect is the published arithmetic of the multipliers, with this
// design's choices where the header of the module under test names them.
module tb_booth_dec;
  import rfw_pkg::*;
  int checks = 0, failures = 0;
  cm_e        op;
  logic [3:0] cs;
  logic [3:0] exp [4] = '{4'b0001, 4'b0010, 4'b0100, 4'b1010};

  booth_dec dut (.op, .cs);

  initial begin
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++) begin
      op = cm_e'(m);
      #1;
      checks++;
      if (cs !== exp[m]) begin
        failures++;
        $display("FAIL op=%0d cs=%b exp %b", m, cs, exp[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

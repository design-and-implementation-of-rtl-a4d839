// tb_bw_dec: checks the Baugh-Wooley multiplier's mode decoder against its
// one-hot table: CM1 -> t = 1000, CM2 -> 0100, CM3 -> 0010, CM4 -> 0001.
// Combinational.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour
// they expect is the published arithmetic of the multipliers, with this
// design's choices where the header of the module under test names them.
module tb_bw_dec;
  import rfw_pkg::*;
  int checks = 0, failures = 0;
  cm_e        op;
  logic [3:0] t;
  logic [3:0] exp [4] = '{4'b1000, 4'b0100, 4'b0010, 4'b0001};

  bw_dec dut (.op, .t);

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
      if (t !== exp[m]) begin
        failures++;
        $display("FAIL op=%0d t=%b exp %b", m, t, exp[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rfw_scc: exhaustive test of the sub-calibration circuits.
// CM1 (cm1 = 1): SCC1 = Km1 & Km2, SCC2 = 0 (one compensation for the whole
// product). Sub-word modes (sub = 1): SCC1 = Km1, SCC2 = Km2 (one per
// sub-product). Exact mode (both 0): no compensation. Combinational.
//
// Stimulus, reference model and checks are this testbench's own; the behaviour
// they expect is the published arithmetic of the multipliers, with this
// design's choices where the header of the module under test names them.
module tb_rfw_scc;
  int checks = 0, failures = 0;
  logic km1, km2, cm1, sub, scc1, scc2;

  rfw_scc dut (.km1, .km2, .cm1, .sub, .scc1, .scc2);

  initial begin
    #1000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [1:0] exp;
    for (int mode = 0; mode < 3; mode++) begin
      for (int k = 0; k < 4; k++) begin
        {km1, km2} = 2'(k);
        cm1 = (mode == 0);
        sub = (mode == 1);
        #1;
        exp = (mode == 0) ? {km1 & km2, 1'b0} : (mode == 1) ? {km1, km2} : 2'b00;
        checks++;
        if ({scc1, scc2} !== exp) begin
          failures++;
          $display("FAIL mode=%0d km=%b%b got %b%b", mode, km1, km2, scc1, scc2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

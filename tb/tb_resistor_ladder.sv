// tb_resistor_ladder: checks the ladder model's tap voltages. For several
// reference voltages each tap must be one ladder step (vref / 16) above the
// one below it, the bottom tap one step above ground and the top tap one step
// below vref.
module tb_resistor_ladder;
  import flash_adc_pkg::*;

  real vref;
  real tap [N_THERM];
  int checks = 0, failures = 0;

  resistor_ladder dut (.vref(vref), .tap(tap));

  task automatic expect_close(real got, real want, string what);
    checks++;
    if (got - want > 1e-9 || want - got > 1e-9) begin
      failures++;
      $display("FAIL %s: got %f, expected %f", what, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static real refs [4] = '{VDD, 0.5, 0.8, 1.6};
    foreach (refs[r]) begin
      real step, v;
      vref = refs[r];
      #1;
      step = vref / 16.0;
      v = 0.0;
      for (int k = 0; k < int'(N_THERM); k++) begin
        v = v + step;                    // one more resistor from ground
        expect_close(tap[k], v, $sformatf("vref=%f tap %0d", vref, k + 1));
      end
      expect_close(vref - tap[N_THERM-1], step, "top resistor");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

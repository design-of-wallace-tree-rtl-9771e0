// tb_flash_adc_full: the flash ADC at its default configuration (ideal
// comparators, 1 V reference) converting a slow ramp over the full input range.
// The input steps through the middle of each of the 16 code bins, then sweeps
// in 1/256 LSB steps, staying off the exact thresholds; every result must be
// floor(16 * vin / vref), the thermometer code must be clean, and the output
// must never fall as the input rises.
module tb_flash_adc_full;
  import flash_adc_pkg::*;

  real    vin, vref;
  therm_t therm;
  code_t  dout;
  int checks = 0, failures = 0;

  flash_adc dut (.vin(vin), .vref(vref), .therm(therm), .dout(dout));

  task automatic convert(real v, int expect_code);
    vin = v;
    #1;
    checks += 2;
    if (int'(dout) != expect_code) begin
      failures++;
      if (failures < 20) $display("FAIL vin=%f dout=%0d expected %0d", v, dout, expect_code);
    end
    if (therm != therm_t'((1 << expect_code) - 1)) begin
      failures++;
      if (failures < 20) $display("FAIL vin=%f therm=%015b", v, therm);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int prev = 0;
    vref = VDD;
    for (int c = 0; c < 16; c++)
      convert(vref * (real'(c) + 0.5) / 16.0, c);
    // Ramp: sample n sits (n mod 256 + 0.5)/256 of an LSB into bin n/256.
    for (int n = 0; n < 16 * 256; n++) begin
      convert(vref * (real'(n) + 0.5) / 4096.0, n / 256);
      checks++;
      if (int'(dout) < prev) begin
        failures++;
        $display("FAIL output fell from %0d to %0d", prev, dout);
      end
      prev = int'(dout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

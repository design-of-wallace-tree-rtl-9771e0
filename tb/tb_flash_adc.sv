// tb_flash_adc: end-to-end test of the flash ADC with comparator offsets that
// put bubbles into the thermometer code.
//
// Comparator 6 gets a -100 mV offset (it switches late, leaving a 0 below
// ones) and comparator 11 a +100 mV offset (it switches early, leaving a 1
// above zeros). The input is swept from below ground to above vref in steps
// of vref/1024. At every step the test works out on its own:
//   - the comparator outputs, from the tap voltages k * vref / 16 and offsets;
//   - the ideal code floor(16 * vin / vref) clipped to 0..15.
// It checks that therm matches the computed comparator outputs, that dout is
// the number of ones in therm, and that dout is within one LSB per bubbled
// comparator of the ideal code. It counts how often each situation occurred:
// a 0 bubble, a 1 bubble, the all-zeros and all-ones (over-range) codes, and
// every output code; one that never occurred is a failure.
module tb_flash_adc;
  import flash_adc_pkg::*;

  localparam real OFS [N_THERM] = '{0.0, 0.0, 0.0, 0.0, 0.0, -0.1, 0.0, 0.0,
                                    0.0, 0.0, 0.1, 0.0, 0.0, 0.0, 0.0};

  real    vin, vref;
  therm_t therm;
  code_t  dout;
  int checks = 0, failures = 0;
  int n_zero_bubble = 0, n_one_bubble = 0, n_underrange = 0, n_overrange = 0;
  int code_seen [16];

  flash_adc #(.CMP_OFFSET(OFS)) dut (.vin(vin), .vref(vref), .therm(therm), .dout(dout));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL vin=%f: %s", vin, what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vref = VDD;
    foreach (code_seen[c]) code_seen[c] = 0;
    for (int s = -16; s <= 1024 + 64; s++) begin
      therm_t want_therm;
      int ideal, ones, bubbled, err;
      vin = vref * real'(s) / 1024.0;
      #1;
      ones = 0;
      bubbled = 0;
      ideal = 0;
      for (int k = 1; k <= int'(N_THERM); k++) begin
        want_therm[k-1] = (vin + OFS[k-1]) > (vref * real'(k) / 16.0);
        ones += int'(want_therm[k-1]);
        if (vin > vref * real'(k) / 16.0) ideal = k;
      end
      for (int k = 1; k <= int'(N_THERM); k++)
        bubbled += int'(want_therm[k-1] != (vin > vref * real'(k) / 16.0));
      check(therm == want_therm, $sformatf("therm=%015b expected %015b", therm, want_therm));
      check(int'(dout) == ones, $sformatf("dout=%0d, %0d ones", dout, ones));
      err = int'(dout) - ideal;
      check(err <= bubbled && -err <= bubbled,
            $sformatf("dout=%0d ideal=%0d with %0d bubbled comparators", dout, ideal, bubbled));
      // Bubble classes, seen in the code the encoder received.
      if (!therm[5] && therm[6]) n_zero_bubble++;
      if (therm[10] && !therm[9]) n_one_bubble++;
      if (therm == '0) n_underrange++;
      if (therm == '1) n_overrange++;
      code_seen[dout]++;
    end
    check(n_zero_bubble > 0, "no 0 bubble occurred");
    check(n_one_bubble > 0, "no 1 bubble occurred");
    check(n_underrange > 0, "all-zeros code never occurred");
    check(n_overrange > 0, "all-ones code never occurred");
    foreach (code_seen[c]) check(code_seen[c] > 0, $sformatf("code %0d never produced", c));
    $display("0 bubbles %0d, 1 bubbles %0d, all-zeros %0d, all-ones %0d",
             n_zero_bubble, n_one_bubble, n_underrange, n_overrange);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_wallace_tree_encoder: exhaustive check of the 15:4 Wallace tree encoder.
// Every one of the 2**15 input words is applied and the output compared with a
// bit-by-bit count of the ones. The clean thermometer codes (0..15 ones from
// the bottom) and the codes with a single bubble are counted separately, and
// each class must have been seen.
module tb_wallace_tree_encoder;
  import flash_adc_pkg::*;

  therm_t therm;
  code_t  bin;
  int checks = 0, failures = 0;
  int n_clean = 0, n_bubble1 = 0;

  wallace_tree_encoder dut (.therm(therm), .bin(bin));

  function automatic int ones(therm_t t);
    int n = 0;
    for (int k = 0; k < int'(N_THERM); k++) n += int'(t[k]);
    return n;
  endfunction

  // Number of bit positions where t differs from the clean code with n ones.
  function automatic int bubbles(therm_t t);
    int n = ones(t);
    int d = 0;
    for (int k = 0; k < int'(N_THERM); k++) d += int'(t[k] != (k < n));
    return d;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N_THERM); v++) begin
      therm = therm_t'(v);
      #1;
      checks++;
      if (int'(bin) != ones(therm)) begin
        failures++;
        if (failures < 10) $display("FAIL therm=%015b bin=%0d expected %0d", therm, bin, ones(therm));
      end
      if (bubbles(therm) == 0) n_clean++;
      // A single 0 inside the ones: the 1 above it makes the clean code differ
      // in two places.
      if (bubbles(therm) == 2) n_bubble1++;
    end
    checks++;
    if (n_clean != int'(N_THERM) + 1) begin
      failures++;
      $display("FAIL saw %0d clean thermometer codes", n_clean);
    end
    checks++;
    if (n_bubble1 == 0) begin
      failures++;
      $display("FAIL no single-bubble codes applied");
    end
    $display("clean codes %0d, single-bubble codes %0d", n_clean, n_bubble1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

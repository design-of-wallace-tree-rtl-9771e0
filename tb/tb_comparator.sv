// tb_comparator: checks the comparator model with and without an offset.
// One instance has no offset, the other a +40 mV input-referred offset. Input
// pairs on both sides of each threshold are applied.
module tb_comparator;
  real  vinp, vinn;
  logic out0, out_ofs;
  int checks = 0, failures = 0;

  comparator #(.VOS(0.0))  dut0    (.vinp(vinp), .vinn(vinn), .out(out0));
  comparator #(.VOS(0.04)) dut_ofs (.vinp(vinp), .vinn(vinn), .out(out_ofs));

  task automatic apply(real p, real n, logic want0, logic want_ofs);
    vinp = p;
    vinn = n;
    #1;
    checks += 2;
    if (out0 !== want0) begin
      failures++;
      $display("FAIL no offset: vinp=%f vinn=%f out=%0b", p, n, out0);
    end
    if (out_ofs !== want_ofs) begin
      failures++;
      $display("FAIL offset: vinp=%f vinn=%f out=%0b", p, n, out_ofs);
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
    apply(0.60, 0.50, 1'b1, 1'b1);
    apply(0.40, 0.50, 1'b0, 1'b0);
    apply(0.48, 0.50, 1'b0, 1'b1);   // below threshold, but within the offset
    apply(0.51, 0.50, 1'b1, 1'b1);
    apply(0.0,  0.0625, 1'b0, 1'b0);
    apply(0.95, 0.9375, 1'b1, 1'b1);
    apply(0.90, 0.9375, 1'b0, 1'b1);
    apply(0.20, 0.25,   1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_calrs_cf_class: exhaustive check of the CF-to-class mapping over all 64
// codes. The expected class is worked out as ceil(log2(CF)) limited to 4,
// which gives 1 -> 0, 2 -> 1, 3..4 -> 2, 5..8 -> 3 and 9 and up -> 4;
// CF 0 is expected in class 0.
`timescale 1ns/1ps
module tb_calrs_cf_class;
  import calrs_pkg::*;
  cf_t   cf;
  prio_t cls;
  int checks = 0, failures = 0;

  calrs_cf_class dut (.cf_i(cf), .class_o(cls));

  initial begin
    for (int v = 0; v < 64; v++) begin
      int exp_cls;
      cf = cf_t'(v);
      #1;
      exp_cls = (v == 0) ? 0 : $clog2(v);
      if (exp_cls > 4) exp_cls = 4;
      checks++;
      if (int'(cls) != exp_cls) begin
        failures++;
        $display("FAIL cf=%0d class=%0d expected %0d", v, cls, exp_cls);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_abs_converter: exhaustive check of the 6-bit magnitude converter.
//
// Applies all 64 values of A and compares mag with |A| computed
// arithmetically from the signed value. For -32, which has no 5-bit
// magnitude, the expected value is 20 (10100), the value the converter's
// minimised equations assign to it. The block is combinational, so each
// output is checked 1 time unit after its input is applied (zero-cycle
// latency). A watchdog ends the run with a failure if it hangs.
module tb_abs_converter;
  import abs_det_pkg::*;

  sample_t a;
  mag_t    mag;
  int      checks = 0;
  int      failures = 0;

  abs_converter dut (.a(a), .mag(mag));

  function automatic mag_t ref_abs(sample_t v);
    int s;
    s = int'($signed(v));
    if (s == -32) return mag_t'(20);
    return mag_t'(s < 0 ? -s : s);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      a = sample_t'(i);
      #1;
      checks++;
      if (mag !== ref_abs(a)) begin
        failures++;
        $display("FAIL a=%0d mag=%0d expected=%0d", $signed(a), mag, ref_abs(a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

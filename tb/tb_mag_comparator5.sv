// tb_mag_comparator5: exhaustive check of the 5-bit greater-than comparator.
//
// Applies all 1024 pairs (a, b) and compares gt with the integer result
// a > b. Also counts how many pairs were decided at each bit position (the
// highest bit where a and b differ) and by equality, and fails if any of
// those six cases never occurred. Combinational: each output is checked
// 1 time unit after its inputs. A watchdog ends a hung run with a failure.
module tb_mag_comparator5;
  import abs_det_pkg::*;

  mag_t a, b;
  logic gt;
  int   checks = 0;
  int   failures = 0;
  int   decided_at[6];   // [0..4]: highest differing bit, [5]: equal

  mag_comparator5 dut (.a(a), .b(b), .gt(gt));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] pos;
    foreach (decided_at[k]) decided_at[k] = 0;
    for (int i = 0; i < 32; i++) begin
      for (int j = 0; j < 32; j++) begin
        a = mag_t'(i);
        b = mag_t'(j);
        #1;
        checks++;
        if (gt !== (i > j)) begin
          failures++;
          $display("FAIL a=%0d b=%0d gt=%0b", i, j, gt);
        end
        pos = 3'd5;
        for (int k = 0; k < 5; k++) if (a[k] != b[k]) pos = 3'(k);
        decided_at[pos]++;
      end
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (decided_at[k] == 0) begin
        failures++;
        $display("FAIL case %0d never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_abs_value_detector: end-to-end check of the absolute-value detector.
//
// Runs the top level at its only configuration (6-bit sample, 5-bit
// threshold) over all 64 x 32 input pairs and compares y with
// (|A| > B), |A| computed arithmetically from the signed sample; for
// A = -32 the magnitude is taken as 20, the value the converter's
// equations give it. It counts how often each behaviour of the design
// occurred and fails for any that never did:
//   negative sample made positive and exceeding B,
//   positive sample exceeding B,
//   |A| equal to B (output 0),
//   decision by the top bit |A4| vs B4,
//   decision by the bottom bit |A0| vs B0 (all higher bits equal),
//   the out-of-range sample -32.
// Combinational: each output is checked 1 time unit after the inputs
// change. A watchdog ends a hung run with a failure.
module tb_abs_value_detector;
  import abs_det_pkg::*;

  sample_t a;
  mag_t    b;
  logic    y;
  int      checks = 0;
  int      failures = 0;

  int n_neg_hit = 0, n_pos_hit = 0, n_equal = 0;
  int n_top_bit = 0, n_low_bit = 0, n_minus32 = 0;

  abs_value_detector dut (.a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end else begin
      $display("%s: %0d", what, count);
    end
  endtask

  initial begin
    int s, m;
    mag_t mm;
    logic exp_y;
    for (int i = 0; i < 64; i++) begin
      for (int j = 0; j < 32; j++) begin
        a = sample_t'(i);
        b = mag_t'(j);
        s = int'($signed(a));
        m = (s == -32) ? 20 : (s < 0 ? -s : s);
        exp_y = (m > j);
        mm = mag_t'(m);
        #1;
        checks++;
        if (y !== exp_y) begin
          failures++;
          $display("FAIL a=%0d b=%0d y=%0b expected=%0b", s, j, y, exp_y);
        end
        if (s < 0 && s != -32 && exp_y) n_neg_hit++;
        if (s > 0 && exp_y) n_pos_hit++;
        if (m == j) n_equal++;
        if (mm[4] != b[4]) n_top_bit++;
        if ((mm[4:1] == b[4:1]) && (mm[0] != b[0])) n_low_bit++;
        if (s == -32) n_minus32++;
      end
    end
    need("negative sample above threshold", n_neg_hit);
    need("positive sample above threshold", n_pos_hit);
    need("magnitude equal to threshold", n_equal);
    need("decided by top bit", n_top_bit);
    need("decided by bottom bit", n_low_bit);
    need("sample -32", n_minus32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// abs_value_detector: 6-bit absolute-value threshold detector (top level).
//
// Raises y when the magnitude of the signed 6-bit sample a is greater than
// the unsigned 5-bit threshold b. Two stages, as in the original block
// diagram: abs_converter turns a into |A4|..|A0|, and mag_comparator5
// compares that magnitude with B4..B0.
//
// Equality: the original's statement of purpose says the output is 1 when
// A is "equal to or greater than" B, but its comparator equation, and the
// circuit drawn from it, have no equality term and give 0 for |A| = B. This
// module follows the comparator equation: y = (|A| > B).
//
// Range: a in -31..31 is handled exactly. a = -32 has no 5-bit magnitude;
// the converter's equations map it to 20, so y = (20 > b) for that input.
//
// Interface: a (A5..A0, two's complement), b (B4..B0), y. Purely
// combinational: no clock, no reset, no state. The longest path is the
// input inverter of A through the converter's five-term sum into the
// comparator's X4 chain and final NAND.
module abs_value_detector
  import abs_det_pkg::*;
(
  input  sample_t a,
  input  mag_t    b,
  output logic    y
);

  mag_t mag;  // |A|

  abs_converter u_abs (
    .a   (a),
    .mag (mag)
  );

  mag_comparator5 u_cmp (
    .a  (mag),
    .b  (b),
    .gt (y)
  );

endmodule

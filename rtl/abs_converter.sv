// abs_converter: magnitude of a 6-bit two's-complement number.
//
// Each magnitude bit is a sum of products over A5..A0 obtained by
// Karnaugh-map minimisation of the 64-entry truth table:
//
//   |A4| = A5 A4' + A5' A4 + A5 A3' A2' A1' A0'
//   |A3| = A5' A3 + A3 A2' A1' A0' + A5 A3' A2 + A5 A3' A0 + A5 A3' A1
//   |A2| = A5' A2 + A2 A1' A0' + A5 A4' A3' A2' + A5 A2' A0 + A5 A2' A1
//   |A1| = A1 A0' + A5' A1 + A5 A1' A0
//   |A0| = A0        (so mag[0] is a plain wire from a[0])
//
// These equations are the original design's. The netlist that realises
// them is this design's own: only inverters and NAND/NOR gates of two or
// three inputs, as the original circuit prescribes (no gate with four or
// more inputs). Wide product terms are split with a NOR of the low bits
// (e.g. A3'A2'A1'A0' = A3' & NOR3(A2,A1,A0)), and the five-term sums are a
// NAND3 and a NAND2 joined by NOR2 + inverter.
//
// Range: for -31..31 the output is exactly |A|. The input -32 has no 5-bit
// magnitude; the equations above give 10100 (20) for it, and so does this
// module.
//
// Interface: a (A5..A0) in, mag (|A4|..|A0|) out. Purely combinational,
// no clock, no state; the output follows the input after the gate delays.
module abs_converter
  import abs_det_pkg::*;
(
  input  sample_t a,
  output mag_t    mag
);

  // input inverters
  logic na0, na1, na2, na3, na4, na5;
  assign na0 = ~a[0];
  assign na1 = ~a[1];
  assign na2 = ~a[2];
  assign na3 = ~a[3];
  assign na4 = ~a[4];
  assign na5 = ~a[5];

  // shared all-zero detectors of low bits
  logic z10, z210, z432;
  assign z10  = ~(a[1] | a[0]);          // NOR2: A1'A0'
  assign z210 = ~(a[2] | a[1] | a[0]);   // NOR3: A2'A1'A0'
  assign z432 = ~(a[4] | a[3] | a[2]);   // NOR3: A4'A3'A2'

  // |A4|
  logic n4_1, n4_2, n4_3;
  assign n4_1   = ~(a[5] & na4);
  assign n4_2   = ~(na5 & a[4]);
  assign n4_3   = ~(a[5] & na3 & z210);
  assign mag[4] = ~(n4_1 & n4_2 & n4_3);

  // |A3|
  logic n3_1, n3_2, n3_3, n3_4, n3_5, s3_a, s3_b, s3_n;
  assign n3_1   = ~(na5 & a[3]);
  assign n3_2   = ~(a[3] & z210);
  assign n3_3   = ~(a[5] & na3 & a[2]);
  assign n3_4   = ~(a[5] & na3 & a[0]);
  assign n3_5   = ~(a[5] & na3 & a[1]);
  assign s3_a   = ~(n3_1 & n3_2 & n3_3);  // first three terms, ORed
  assign s3_b   = ~(n3_4 & n3_5);         // last two terms, ORed
  assign s3_n   = ~(s3_a | s3_b);
  assign mag[3] = ~s3_n;

  // |A2|
  logic n2_1, n2_2, n2_3, n2_4, n2_5, s2_a, s2_b, s2_n;
  assign n2_1   = ~(na5 & a[2]);
  assign n2_2   = ~(a[2] & z10);
  assign n2_3   = ~(a[5] & z432);
  assign n2_4   = ~(a[5] & na2 & a[0]);
  assign n2_5   = ~(a[5] & na2 & a[1]);
  assign s2_a   = ~(n2_1 & n2_2 & n2_3);
  assign s2_b   = ~(n2_4 & n2_5);
  assign s2_n   = ~(s2_a | s2_b);
  assign mag[2] = ~s2_n;

  // |A1|
  logic n1_1, n1_2, n1_3;
  assign n1_1   = ~(a[1] & na0);
  assign n1_2   = ~(na5 & a[1]);
  assign n1_3   = ~(a[5] & na1 & a[0]);
  assign mag[1] = ~(n1_1 & n1_2 & n1_3);

  // |A0|
  assign mag[0] = a[0];

endmodule

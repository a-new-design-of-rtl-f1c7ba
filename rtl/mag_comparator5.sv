// mag_comparator5: 5-bit unsigned "greater than" comparator.
//
// Function (from the original design):
//
//   gt  = A4 B4' + X4 A3 B3' + X4 X3 A2 B2' + X4 X3 X2 A1 B1'
//         + X4 X3 X2 X1 A0 B0'
//   X_i = A_i B_i + A_i' B_i'            (bit i of A equals bit i of B)
//
// All bits are compared at once. X_i is formed as the NOR of the two
// "differ" products A_i B_i' and A_i' B_i, so a bit position that differs
// blocks every lower position and the highest differing bit decides. Equal
// operands give 0.
//
// As in the original simplified circuit, the netlist uses only inverters
// and NAND/NOR gates of two or three inputs: the four- and five-input AND
// gates and the five-input OR of the direct form are broken into two- and
// three-input gates, and the final OR is realised as a NAND of inverted
// partial sums (De Morgan). Exactly how the wide gates are split is this
// design's own choice:
//
//   e43_n = NAND2(X4,X3)                  shared prefix of terms 3 and 4
//   t3    = NOR2(e43_n, NAND2(X2, A1B1'))
//   t4    = NOR2(e43_n, NAND3(X2, X1, A0B0'))
//   r1    = NAND3(~t0, ~t1, ~t2)          t0 + t1 + t2
//   gt    = NAND2(~r1, NOR2(t3, t4))      r1 + t3 + t4
//
// Interface: a, b (5 bits each, unsigned) in, gt out. Purely
// combinational, no clock, no state.
module mag_comparator5
  import abs_det_pkg::*;
(
  input  mag_t a,
  input  mag_t b,
  output logic gt
);

  mag_t na;           // input inverters of A
  logic [B_W-1:1] nb; // input inverters of B (B0' is not needed)
  mag_t g;        // g[i] = A_i B_i'  (NOR2 of A_i', B_i)
  logic [B_W-1:1] l;  // l[i] = A_i' B_i  (NOR2 of A_i, B_i')
  logic [B_W-1:1] x;  // x[i] = X_i       (NOR2 of g[i], l[i]); X_0 is
                      // not needed, the bottom bit has no lower bits

  assign na = ~a;
  assign nb = ~b[B_W-1:1];

  assign g[0] = ~(na[0] | b[0]);
  for (genvar i = 1; i < int'(B_W); i++) begin : g_bit
    assign g[i] = ~(na[i] | b[i]);
    assign l[i] = ~(a[i] | nb[i]);
    assign x[i] = ~(g[i] | l[i]);
  end

  // inverted product terms of the three upper terms
  logic t0_n, t1_n, t2_n;
  assign t0_n = ~(a[4] & nb[4]);               // ~(A4 B4')
  assign t1_n = ~(x[4] & g[3]);                // ~(X4 A3 B3')
  assign t2_n = ~(x[4] & x[3] & g[2]);         // ~(X4 X3 A2 B2')

  // the two long terms, split around the shared X4 X3 prefix
  logic e43_n, p3_n, p4_n, t3, t4;
  assign e43_n = ~(x[4] & x[3]);
  assign p3_n  = ~(x[2] & g[1]);
  assign p4_n  = ~(x[2] & x[1] & g[0]);
  assign t3    = ~(e43_n | p3_n);              // X4 X3 X2 A1 B1'
  assign t4    = ~(e43_n | p4_n);              // X4 X3 X2 X1 A0 B0'

  // five-input OR as NAND of inverted partial sums
  logic r1, r1_n, r2_n;
  assign r1   = ~(t0_n & t1_n & t2_n);         // t0 + t1 + t2
  assign r1_n = ~r1;
  assign r2_n = ~(t3 | t4);                    // ~(t3 + t4)
  assign gt   = ~(r1_n & r2_n);

endmodule

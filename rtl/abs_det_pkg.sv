// abs_det_pkg: widths and types shared by the absolute-value detector.
//
// The detector compares the magnitude of a 6-bit two's-complement sample
// with a 5-bit unsigned threshold (the threshold's sixth, top bit is taken
// as zero). Both widths come from the original design; the gate netlists
// in abs_converter and mag_comparator5 are written for exactly these
// widths, so they are constants here rather than module parameters.
package abs_det_pkg;

  localparam int unsigned A_W = 6;  // signed input sample A5..A0
  localparam int unsigned B_W = 5;  // unsigned threshold B4..B0 and |A|

  typedef logic [A_W-1:0] sample_t;  // two's complement
  typedef logic [B_W-1:0] mag_t;     // unsigned magnitude / threshold

endpackage

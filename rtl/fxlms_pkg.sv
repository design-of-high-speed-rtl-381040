// fxlms_pkg: shared types and helpers of the hardware-shared transposed
// delayed-FxLMS filter (HS-TF-RDFxLMS).
//
// Number formats used throughout the design (the word widths are this
// design's choice; the filter length and the two-way hardware sharing follow
// the architecture it implements):
//   * samples x, d, y, e and the filtered reference x' : signed Q1.15
//   * secondary-path model coefficients s'             : signed Q1.15
//   * adaptive weights w                               : signed Q1.23
// The slot type names the two taps a shared processing module serves: slot 0
// is tap j (group "4Tap0"), slot 1 is tap j+N/2 (group "4Tap1").
package fxlms_pkg;

  typedef enum logic {
    SLOT_G0 = 1'b0,   // taps 0 .. N/2-1, served on even cycles
    SLOT_G1 = 1'b1    // taps N/2 .. N-1, served on odd cycles
  } slot_e;

  // Saturate a wide signed value (given as 64 bits) to OUT_W bits.
  function automatic logic signed [63:0] sat64(input logic signed [63:0] v, input int out_w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (out_w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (out_w - 1));
    if (v > hi)      return hi;
    else if (v < lo) return lo;
    else             return v;
  endfunction

endpackage

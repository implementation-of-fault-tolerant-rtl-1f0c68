// ecc_fir_pkg: constants shared by the Hamming-protected parallel FIR filter bank.
//
// The bank runs K identical FIR filters on K independent input streams and adds
// R redundant "check" filters. Check filter j is fed the sum of the data inputs that
// row j of the Hamming parity-check matrix selects. Because an FIR filter is linear,
// its output must equal the sum of the same data filters' outputs. A failed filter
// then shows up as a pattern of failed checks (the syndrome), which points at it.
//
// A check mask is a packed [R-1:0][K-1:0] array: bit mask[j][i] is 1 when data
// filter i (0-based, i = 0 is filter 1) takes part in check j (j = 0 is check 1).
// The masks below copy the parity equations of the (7,4) and (15,11) codes.
// All arithmetic is modulo 2^W, so sums wrap, and the checks stay exact.
package ecc_fir_pkg;

  // Sample and output width: the 8-bit Data and YC buses of the two banks.
  parameter int unsigned W    = 8;
  // Taps per filter: the check filter sums run over l = 0..8.
  parameter int unsigned TAPS = 9;

  // Default impulse response. The document gives no coefficients; these are chosen
  // so that they sum to 1, so a constant input comes out unchanged at steady state.
  parameter logic signed [W-1:0] H_DEFAULT [TAPS] =
    '{8'sd1, 8'sd2, -8'sd3, 8'sd4, -8'sd5, 8'sd4, -8'sd3, 8'sd2, -8'sd1};

  // (7,4) code: p1 = d1+d2+d3, p2 = d1+d2+d4, p3 = d1+d3+d4.
  //                                             d4 d3 d2 d1
  parameter logic [2:0][3:0] MASK_7_4 = '{4'b1101,   // check 3: d1 d3 d4
                                          4'b1011,   // check 2: d1 d2 d4
                                          4'b0111};  // check 1: d1 d2 d3

  // (15,11) code, from the four rows of its parity-check matrix:
  // check 1: d1 d2 d4 d5 d7 d9 d11      check 2: d1 d3 d4 d6 d7 d10 d11
  // check 3: d2 d3 d4 d8 d9 d10 d11     check 4: d5 d6 d7 d8 d9 d10 d11
  //                                                d11 ... d1
  parameter logic [3:0][10:0] MASK_15_11 = '{11'b111_1111_0000,   // check 4
                                             11'b111_1000_1110,   // check 3
                                             11'b110_0110_1101,   // check 2
                                             11'b101_0101_1011};  // check 1

endpackage

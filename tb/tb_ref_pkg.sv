// tb_ref_pkg: reference models used by the testbenches, written independently of
// the RTL. An FIR filter is modelled on plain integers and reduced modulo 256 at the
// end; the Hamming checks are written as lists of 1-based filter numbers.
package tb_ref_pkg;

  localparam int NTAPS = 9;
  localparam int H_REF [NTAPS] = '{1, 2, -3, 4, -5, 4, -3, 2, -1};

  // (7,4): check 1 = {1,2,3}, check 2 = {1,2,4}, check 3 = {1,3,4}
  // (15,11): rows of the parity-check matrix as strings, leftmost character = d1.
  localparam string H4 [3] = '{"1110100", "1101010", "1011001"};
  localparam string H11 [4] = '{"110110101011000", "101101100110100",
                                "011100011110010", "000011111110001"};

  // 1 when data filter i (1-based) is in check j (1-based) of a code with k data filters
  function automatic bit in_check(int k, int j, int i);
    if (k == 4) return H4[j-1][i-1] == "1";
    return H11[j-1][i-1] == "1";
  endfunction

  // Syndrome (check 1 in the MSB) of a fault on code position p (1-based; 1..k data,
  // k+1..n checks), read from the column of the printed matrix.
  function automatic int syn_of(int k, int r, int p);
    int s = 0;
    for (int j = 1; j <= r; j++) begin
      bit b = (k == 4) ? (H4[j-1][p-1] == "1") : (H11[j-1][p-1] == "1");
      s = (s << 1) | int'(b);
    end
    return s;
  endfunction

  // Filter output for history h[0] = x[n], h[1] = x[n-1], ...
  function automatic int fir_ref(int h [NTAPS]);
    int acc = 0;
    for (int t = 0; t < NTAPS; t++) acc += H_REF[t] * h[t];
    return acc & 255;
  endfunction

endpackage

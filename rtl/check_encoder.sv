// check_encoder: the "coding" block that builds the inputs of the redundant filters.
//
// Check input j is the sum (modulo 2^W) of the data inputs that row j of the
// parity-check mask selects, for example X5 = X1 + X2 + X3 in the (7,4) bank. It is
// the Hamming parity equation with the exclusive-or replaced by an integer addition,
// which is what makes the check filters' outputs predictable from the data filters'
// outputs. Purely combinational: the check filters register its outputs together
// with the data samples, so check and data streams stay aligned.
module check_encoder #(
  parameter int unsigned         W    = ecc_fir_pkg::W,
  parameter int unsigned         K    = 4,
  parameter int unsigned         R    = 3,
  parameter logic [R-1:0][K-1:0] MASK = ecc_fir_pkg::MASK_7_4
) (
  input  logic [K-1:0][W-1:0] x,    // data inputs X1..XK (x[0] = X1)
  output logic [R-1:0][W-1:0] xc    // check inputs XK+1..XK+R (xc[0] = first check)
);

  always_comb begin
    for (int j = 0; j < R; j++) begin
      xc[j] = '0;
      for (int i = 0; i < K; i++)
        if (MASK[j][i]) xc[j] = xc[j] + x[i];
    end
  end

endmodule

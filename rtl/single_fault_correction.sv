// single_fault_correction: syndrome calculation, error location and correction.
//
// Syndrome: check j compares the check filter output z[j] with the sum of the data
// filter outputs that row j of the mask selects; bit R-1-j of the syndrome is 1 when
// they differ (check 1 is the most significant bit, as S1 in S1 S2 S3).
// Location: a syndrome equal to column i of the mask means data filter i is faulty;
// a one-hot syndrome means a check filter is faulty; 0 means no fault.
// Correction: a faulty data filter's output is rebuilt from the first check that
// covers it, yc[i] = z[j] - sum of the other data outputs in check j (for filter 1 of
// the (7,4) bank, Yc1 = Z1 - Y2 - Y3). All other outputs pass unchanged, also when a
// check filter is the faulty one.
// Outputs are registered: yc and syndrome appear one clock edge after y and z.
// The checks and the rebuild formula follow the document; the choice of the first
// covering check, the registered outputs and the synchronous reset are this design's.
module single_fault_correction #(
  parameter int unsigned         W    = ecc_fir_pkg::W,
  parameter int unsigned         K    = 4,
  parameter int unsigned         R    = 3,
  parameter logic [R-1:0][K-1:0] MASK = ecc_fir_pkg::MASK_7_4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [K-1:0][W-1:0] y,         // data filter outputs Y1..YK
  input  logic [R-1:0][W-1:0] z,         // check filter outputs Z1..ZR
  output logic [K-1:0][W-1:0] yc,        // corrected outputs Yc1..YcK
  output logic [R-1:0]        syndrome   // registered syndrome, S1 in the MSB
);

  logic [R-1:0]        s;
  logic [R-1:0][W-1:0] resid;   // z[j] minus the sum of its data outputs
  logic [K-1:0][W-1:0] yc_d;

  always_comb begin
    for (int j = 0; j < R; j++) begin
      resid[j] = z[j];
      for (int i = 0; i < K; i++)
        if (MASK[j][i]) resid[j] = resid[j] - y[i];
      s[R-1-j] = (resid[j] != '0);
    end
  end

  always_comb begin
    logic [R-1:0] col;
    logic [W-1:0] fix;   // residue of the first check that covers filter i
    for (int i = 0; i < K; i++) begin
      fix = '0;
      for (int j = R - 1; j >= 0; j--) begin
        col[R-1-j] = MASK[j][i];
        if (MASK[j][i]) fix = resid[j];
      end
      // z[j] - (other data outputs of check j) = y[i] + resid[j]
      yc_d[i] = (s == col) ? (y[i] + fix) : y[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      yc       <= '0;
      syndrome <= '0;
    end else begin
      yc       <= yc_d;
      syndrome <= s;
    end
  end

endmodule

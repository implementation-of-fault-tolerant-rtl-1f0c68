// parallel_fir_ecc: K parallel FIR filters protected by R redundant filters and a
// Hamming code, able to correct the failure of any one of its K + R filters.
//
// Dataflow, one sample per stream per clock:
//   x[0..K-1] --> K data filters ------------------> y --+
//        |                                               +--> fault_injector --> single_fault_correction --> yc
//        +--> check_encoder --> R check filters ---> z --+
// The check_encoder forms sums of the inputs (one per parity equation of the code),
// the check filters filter them, and the single fault correction compares each
// check filter output with the sum of the matching data filter outputs. The fault
// injector lets a test corrupt any one filter output (es, fault_mask).
//
// Elaboration stops with an error when K, R and MASK cannot form a single-error-
// correcting code (the rule 2^R >= K + R + 1, and distinct mask columns).
//
// Latency: 2 clock edges from x to yc and syndrome (one in the filters, one in the
// correction). Synchronous, active-high reset.
// The structure (encoder, original and redundant modules, single fault correction)
// follows the document; the latency and the fault injection port are this design's.
module parallel_fir_ecc #(
  parameter int unsigned         W    = ecc_fir_pkg::W,
  parameter int unsigned         TAPS = ecc_fir_pkg::TAPS,
  parameter int unsigned         K    = 4,
  parameter int unsigned         R    = 3,
  parameter logic [R-1:0][K-1:0] MASK = ecc_fir_pkg::MASK_7_4,
  parameter logic signed [W-1:0] COEF [TAPS] = ecc_fir_pkg::H_DEFAULT
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [K-1:0][W-1:0] x,           // input samples, x[0] = X1
  input  logic [R-1:0]        es,          // fault injection select (0 = none)
  input  logic [W-1:0]        fault_mask,  // bits flipped in the selected filter output
  output logic [K-1:0][W-1:0] yc,          // corrected filter outputs, yc[0] = Yc1
  output logic [R-1:0]        syndrome     // syndrome of the same samples, S1 in the MSB
);

  // A single-error-correcting code needs 2^R >= K + R + 1 (every filter and "no
  // fault" must get its own syndrome), and every data column of MASK must be
  // distinct and have at least two checks, so that no two filters share a syndrome.
  function automatic bit mask_ok();
    for (int i = 0; i < K; i++) begin
      int unsigned ones = 0;
      for (int j = 0; j < R; j++) ones += 32'(MASK[j][i]);
      if (ones < 2) return 1'b0;
      for (int m = 0; m < i; m++) begin
        bit same = 1'b1;
        for (int j = 0; j < R; j++) if (MASK[j][i] != MASK[j][m]) same = 1'b0;
        if (same) return 1'b0;
      end
    end
    return 1'b1;
  endfunction

  if ((2 ** R) < (K + R + 1)) begin : g_bad_size
    $error("parallel_fir_ecc: R = %0d check filters cannot protect K = %0d filters", R, K);
  end
  if (!mask_ok()) begin : g_bad_mask
    $error("parallel_fir_ecc: MASK columns must be distinct with at least two checks each");
  end

  logic [R-1:0][W-1:0] xc;        // check filter inputs
  logic [K-1:0][W-1:0] y, y_f;    // data filter outputs, before and after injection
  logic [R-1:0][W-1:0] z, z_f;    // check filter outputs, before and after injection

  check_encoder #(.W(W), .K(K), .R(R), .MASK(MASK)) u_enc (.x(x), .xc(xc));

  for (genvar i = 0; i < K; i++) begin : g_data
    fir_filter #(.W(W), .TAPS(TAPS), .COEF(COEF)) u_fir (
      .clk(clk), .rst(rst), .x(x[i]), .y(y[i]));
  end

  for (genvar j = 0; j < R; j++) begin : g_check
    fir_filter #(.W(W), .TAPS(TAPS), .COEF(COEF)) u_fir (
      .clk(clk), .rst(rst), .x(xc[j]), .y(z[j]));
  end

  fault_injector #(.W(W), .K(K), .R(R), .MASK(MASK)) u_inj (
    .es(es), .fault_mask(fault_mask),
    .y_in(y), .z_in(z), .y_out(y_f), .z_out(z_f));

  single_fault_correction #(.W(W), .K(K), .R(R), .MASK(MASK)) u_sfc (
    .clk(clk), .rst(rst), .y(y_f), .z(z_f), .yc(yc), .syndrome(syndrome));

endmodule

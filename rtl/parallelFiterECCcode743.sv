// parallelFiterECCcode743: four filters protected by a (7,4) Hamming code.
//
// 4 parallel 8-bit, 9-tap FIR filters with the same impulse response, protected by
// 3 redundant filters and a (7,4) Hamming code: a failure of any one of the
// 7 filters is located by the 3-bit syndrome and corrected, so YC1..YC4 stay the
// filtered DataA..DataD. ES injects a test fault: 0 none, otherwise the syndrome of
// the filter whose output gets FAULT_MASK exclusive-ored into it (see fault_injector).
// Timing: one sample per stream per Clock; YC and Syndrome follow the samples by two
// rising edges. Reset is synchronous and active high.
// The module name and the Data, ES, Clock, Reset and YC ports are the document's; the
// Syndrome output and the FAULT_MASK parameter are added by this design.
module parallelFiterECCcode743 #(
  parameter logic [7:0] FAULT_MASK = 8'hFF
) (
  input  logic       Clock,
  input  logic       Reset,
  input  logic [7:0] DataA,   // X1
  input  logic [7:0] DataB,   // X2
  input  logic [7:0] DataC,   // X3
  input  logic [7:0] DataD,   // X4
  input  logic [2:0] ES,      // fault injection select
  output logic [7:0] YC1,   // Yc1
  output logic [7:0] YC2,   // Yc2
  output logic [7:0] YC3,   // Yc3
  output logic [7:0] YC4,   // Yc4
  output logic [2:0] Syndrome // which filter failed (0 = none)
);

  logic [3:0][7:0] yc;

  parallel_fir_ecc #(
    .W(8), .TAPS(ecc_fir_pkg::TAPS), .K(4), .R(3), .MASK(ecc_fir_pkg::MASK_7_4),
    .COEF(ecc_fir_pkg::H_DEFAULT)
  ) u_core (
    .clk(Clock), .rst(Reset),
    .x({DataD, DataC, DataB, DataA}),
    .es(ES), .fault_mask(FAULT_MASK),
    .yc(yc), .syndrome(Syndrome)
  );

  assign {YC4, YC3, YC2, YC1} = yc;

endmodule

// parallelECC15: eleven filters protected by a (15,11) Hamming code.
//
// 11 parallel 8-bit, 9-tap FIR filters with the same impulse response, protected by
// 4 redundant filters and a (15,11) Hamming code: a failure of any one of the
// 15 filters is located by the 4-bit syndrome and corrected, so YC1..YC11 stay the
// filtered DataA..DataK. ES injects a test fault: 0 none, otherwise the syndrome of
// the filter whose output gets FAULT_MASK exclusive-ored into it (see fault_injector).
// Timing: one sample per stream per Clock; YC and Syndrome follow the samples by two
// rising edges. Reset is synchronous and active high.
// The module name and the Data, ES, Clock, Reset and YC ports are the document's; the
// Syndrome output and the FAULT_MASK parameter are added by this design.
module parallelECC15 #(
  parameter logic [7:0] FAULT_MASK = 8'hFF
) (
  input  logic       Clock,
  input  logic       Reset,
  input  logic [7:0] DataA,   // X1
  input  logic [7:0] DataB,   // X2
  input  logic [7:0] DataC,   // X3
  input  logic [7:0] DataD,   // X4
  input  logic [7:0] DataE,   // X5
  input  logic [7:0] DataF,   // X6
  input  logic [7:0] DataG,   // X7
  input  logic [7:0] DataH,   // X8
  input  logic [7:0] DataI,   // X9
  input  logic [7:0] DataJ,   // X10
  input  logic [7:0] DataK,   // X11
  input  logic [3:0] ES,      // fault injection select
  output logic [7:0] YC1,   // Yc1
  output logic [7:0] YC2,   // Yc2
  output logic [7:0] YC3,   // Yc3
  output logic [7:0] YC4,   // Yc4
  output logic [7:0] YC5,   // Yc5
  output logic [7:0] YC6,   // Yc6
  output logic [7:0] YC7,   // Yc7
  output logic [7:0] YC8,   // Yc8
  output logic [7:0] YC9,   // Yc9
  output logic [7:0] YC10,   // Yc10
  output logic [7:0] YC11,   // Yc11
  output logic [3:0] Syndrome // which filter failed (0 = none)
);

  logic [10:0][7:0] yc;

  parallel_fir_ecc #(
    .W(8), .TAPS(ecc_fir_pkg::TAPS), .K(11), .R(4), .MASK(ecc_fir_pkg::MASK_15_11),
    .COEF(ecc_fir_pkg::H_DEFAULT)
  ) u_core (
    .clk(Clock), .rst(Reset),
    .x({DataK, DataJ, DataI, DataH, DataG, DataF, DataE, DataD, DataC, DataB, DataA}),
    .es(ES), .fault_mask(FAULT_MASK),
    .yc(yc), .syndrome(Syndrome)
  );

  assign {YC11, YC10, YC9, YC8, YC7, YC6, YC5, YC4, YC3, YC2, YC1} = yc;

endmodule

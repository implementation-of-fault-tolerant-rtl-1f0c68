// fault_tolerant_parallel_fir: both Hamming-protected parallel FIR filter banks.
//
// The design comes in two sizes: four filters with a (7,4) code and three redundant
// filters (parallelFiterECCcode743), and eleven filters with a (15,11) code and four
// redundant filters (parallelECC15). Each corrects the failure of any single one of
// its filters. They share Clock and Reset and have their own data, fault injection
// (es) and output ports, packed as arrays here: b4_data[0] is X1 of the four-filter
// bank, b11_yc[10] is Yc11 of the eleven-filter bank.
// Timing: one sample per stream per clock, outputs two rising edges after their
// inputs, synchronous active-high reset.
module fault_tolerant_parallel_fir (
  input  logic             clk,
  input  logic             rst,
  // (7,4) bank
  input  logic [3:0][7:0]  b4_data,
  input  logic [2:0]       b4_es,
  output logic [3:0][7:0]  b4_yc,
  output logic [2:0]       b4_syndrome,
  // (15,11) bank
  input  logic [10:0][7:0] b11_data,
  input  logic [3:0]       b11_es,
  output logic [10:0][7:0] b11_yc,
  output logic [3:0]       b11_syndrome
);

  parallelFiterECCcode743 u_bank4 (
    .Clock(clk), .Reset(rst),
    .DataA(b4_data[0]), .DataB(b4_data[1]), .DataC(b4_data[2]), .DataD(b4_data[3]),
    .ES(b4_es),
    .YC1(b4_yc[0]), .YC2(b4_yc[1]), .YC3(b4_yc[2]), .YC4(b4_yc[3]),
    .Syndrome(b4_syndrome));

  parallelECC15 u_bank11 (
    .Clock(clk), .Reset(rst),
    .DataA(b11_data[0]), .DataB(b11_data[1]), .DataC(b11_data[2]), .DataD(b11_data[3]),
    .DataE(b11_data[4]), .DataF(b11_data[5]), .DataG(b11_data[6]), .DataH(b11_data[7]),
    .DataI(b11_data[8]), .DataJ(b11_data[9]), .DataK(b11_data[10]),
    .ES(b11_es),
    .YC1(b11_yc[0]), .YC2(b11_yc[1]), .YC3(b11_yc[2]), .YC4(b11_yc[3]),
    .YC5(b11_yc[4]), .YC6(b11_yc[5]), .YC7(b11_yc[6]), .YC8(b11_yc[7]),
    .YC9(b11_yc[8]), .YC10(b11_yc[9]), .YC11(b11_yc[10]),
    .Syndrome(b11_syndrome));

endmodule

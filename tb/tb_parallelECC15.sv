// tb_parallelECC15: the eleven-filter (15,11) bank.
// Part 1 holds constant samples and steps ES through every filter of the bank; as
// the filter coefficients sum to 1, YC must settle to the samples themselves and
// Syndrome must equal ES. Part 2 drives random samples and a random ES every cycle
// and compares YC with an integer filter model two cycles after each sample.
module tb_parallelECC15;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic [10:0][7:0] x, yc;
  logic [3:0] es, syn;
  int checks = 0, failures = 0;

  parallelECC15 dut (
    .Clock(clk), .Reset(rst), .ES(es), .Syndrome(syn),
    .DataA(x[0]),
    .DataB(x[1]),
    .DataC(x[2]),
    .DataD(x[3]),
    .DataE(x[4]),
    .DataF(x[5]),
    .DataG(x[6]),
    .DataH(x[7]),
    .DataI(x[8]),
    .DataJ(x[9]),
    .DataK(x[10]),
    .YC1(yc[0]),
    .YC2(yc[1]),
    .YC3(yc[2]),
    .YC4(yc[3]),
    .YC5(yc[4]),
    .YC6(yc[5]),
    .YC7(yc[6]),
    .YC8(yc[7]),
    .YC9(yc[8]),
    .YC10(yc[9]),
    .YC11(yc[10]));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d expected %0d", what, got, exp); end
  endtask

  localparam int SAMPLES [11] = '{76, 34, 45, 54, 12, 200, 99, 1, 128, 255, 7};
  localparam int ES_SEQ [16] = '{0, 1, 2, 4, 8, 12, 10, 6, 14, 9, 5, 13, 3, 11, 7, 15};
  int hist [11][NTAPS], expq [2][11];

  initial begin
    x = '0; es = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // part 1: constant samples, one ES value after the other
    for (int i = 0; i < 11; i++) x[i] = 8'(SAMPLES[i]);
    foreach (ES_SEQ[k]) begin
      es = 4'(ES_SEQ[k]);
      repeat (12) @(posedge clk);
      #1;
      for (int i = 0; i < 11; i++) chk(int'(yc[i]), SAMPLES[i], "settled YC");
      chk(int'(syn), ES_SEQ[k], "syndrome");
    end
    // part 2: random samples and faults, against the model
    rst = 1; es = '0; x = '0;
    @(posedge clk); #1 rst = 0;
    foreach (hist[i, t]) hist[i][t] = 0;
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 11; i++) x[i] = 8'($urandom);
      es = 4'($urandom);
      for (int i = 0; i < 11; i++) begin
        for (int t = NTAPS - 1; t > 0; t--) hist[i][t] = hist[i][t-1];
        hist[i][0] = int'(x[i]);
        expq[1][i] = expq[0][i]; expq[0][i] = fir_ref(hist[i]);
      end
      @(posedge clk); #1;
      if (n >= 2) begin
        for (int i = 0; i < 11; i++) chk(int'(yc[i]), expq[1][i], "YC");
        chk(int'(syn), int'(es), "syndrome");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_parallelFiterECCcode743: the four-filter (7,4) bank.
// Part 1 holds constant samples and steps ES through every filter of the bank; as
// the filter coefficients sum to 1, YC must settle to the samples themselves and
// Syndrome must equal ES. Part 2 drives random samples and a random ES every cycle
// and compares YC with an integer filter model two cycles after each sample.
module tb_parallelFiterECCcode743;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic [3:0][7:0] x, yc;
  logic [2:0] es, syn;
  int checks = 0, failures = 0;

  parallelFiterECCcode743 dut (
    .Clock(clk), .Reset(rst), .ES(es), .Syndrome(syn),
    .DataA(x[0]),
    .DataB(x[1]),
    .DataC(x[2]),
    .DataD(x[3]),
    .YC1(yc[0]),
    .YC2(yc[1]),
    .YC3(yc[2]),
    .YC4(yc[3]));

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

  localparam int SAMPLES [4] = '{76, 34, 45, 54};
  localparam int ES_SEQ [8] = '{0, 1, 2, 4, 6, 3, 5, 7};
  int hist [4][NTAPS], expq [2][4];

  initial begin
    x = '0; es = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // part 1: constant samples, one ES value after the other
    for (int i = 0; i < 4; i++) x[i] = 8'(SAMPLES[i]);
    foreach (ES_SEQ[k]) begin
      es = 3'(ES_SEQ[k]);
      repeat (12) @(posedge clk);
      #1;
      for (int i = 0; i < 4; i++) chk(int'(yc[i]), SAMPLES[i], "settled YC");
      chk(int'(syn), ES_SEQ[k], "syndrome");
    end
    // part 2: random samples and faults, against the model
    rst = 1; es = '0; x = '0;
    @(posedge clk); #1 rst = 0;
    foreach (hist[i, t]) hist[i][t] = 0;
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 4; i++) x[i] = 8'($urandom);
      es = 3'($urandom);
      for (int i = 0; i < 4; i++) begin
        for (int t = NTAPS - 1; t > 0; t--) hist[i][t] = hist[i][t-1];
        hist[i][0] = int'(x[i]);
        expq[1][i] = expq[0][i]; expq[0][i] = fir_ref(hist[i]);
      end
      @(posedge clk); #1;
      if (n >= 2) begin
        for (int i = 0; i < 4; i++) chk(int'(yc[i]), expq[1][i], "YC");
        chk(int'(syn), int'(es), "syndrome");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

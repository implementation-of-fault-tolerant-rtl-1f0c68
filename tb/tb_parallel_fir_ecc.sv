// tb_parallel_fir_ecc: the generic bank in its (7,4) and (15,11) configurations, fed
// random sample streams while a random filter (or none) is corrupted every cycle by
// a random fault mask. Every corrected output must equal the integer filter model
// two cycles after its sample, and the syndrome must name the corrupted filter.
module tb_parallel_fir_ecc;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic [3:0][7:0]  x4, yc4;
  logic [2:0]       es4, s4;
  logic [10:0][7:0] x11, yc11;
  logic [3:0]       es11, s11;
  logic [7:0]       fm;
  int checks = 0, failures = 0;

  parallel_fir_ecc #(.K(4), .R(3), .MASK(ecc_fir_pkg::MASK_7_4)) dut4 (
    .clk(clk), .rst(rst), .x(x4), .es(es4), .fault_mask(fm), .yc(yc4), .syndrome(s4));
  parallel_fir_ecc #(.K(11), .R(4), .MASK(ecc_fir_pkg::MASK_15_11)) dut11 (
    .clk(clk), .rst(rst), .x(x11), .es(es11), .fault_mask(fm), .yc(yc11), .syndrome(s11));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d expected %0d", what, got, exp); end
  endtask

  int h4 [4][NTAPS], h11 [11][NTAPS];
  int exp4 [3][4], exp11 [3][11];   // expected filter outputs, pipelined by cycle
  int es4_d, es11_d;

  initial begin
    x4 = '0; x11 = '0; es4 = '0; es11 = '0; fm = 8'hFF;
    foreach (h4[i, t]) h4[i][t] = 0;
    foreach (h11[i, t]) h11[i][t] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 1500; n++) begin
      // inputs of cycle n
      foreach (x4[i]) x4[i] = 8'($urandom);
      foreach (x11[i]) x11[i] = 8'($urandom);
      // the fault set now hits the filter outputs of the previous cycle's samples
      es4 = 3'($urandom); es11 = 4'($urandom);
      if (n % 5 == 0) begin es4 = '0; es11 = '0; end
      es4_d = int'(es4); es11_d = int'(es11);
      fm = 8'($urandom_range(1, 255));
      for (int i = 0; i < 4; i++) begin
        for (int t = NTAPS - 1; t > 0; t--) h4[i][t] = h4[i][t-1];
        h4[i][0] = int'(x4[i]);
        exp4[2][i] = exp4[1][i]; exp4[1][i] = exp4[0][i]; exp4[0][i] = fir_ref(h4[i]);
      end
      for (int i = 0; i < 11; i++) begin
        for (int t = NTAPS - 1; t > 0; t--) h11[i][t] = h11[i][t-1];
        h11[i][0] = int'(x11[i]);
        exp11[2][i] = exp11[1][i]; exp11[1][i] = exp11[0][i]; exp11[0][i] = fir_ref(h11[i]);
      end
      @(posedge clk); #1;
      // after this edge: yc holds the result of the samples of cycle n-1
      if (n >= 2) begin
        for (int i = 0; i < 4; i++) chk(int'(yc4[i]), exp4[1][i], "(7,4) yc");
        for (int i = 0; i < 11; i++) chk(int'(yc11[i]), exp11[1][i], "(15,11) yc");
        chk(int'(s4), es4_d, "(7,4) syndrome");
        chk(int'(s11), es11_d, "(15,11) syndrome");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_single_fault_correction: builds consistent filter outputs (each check value the
// sum of its data values), corrupts none or one of the n positions by a random
// nonzero amount, and checks one cycle later that the syndrome names that position
// and that every corrected output equals the uncorrupted data value. Runs the (7,4)
// and the (15,11) configuration side by side.
module tb_single_fault_correction;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic [3:0][7:0]  y4;
  logic [2:0][7:0]  z4;
  logic [3:0][7:0]  yc4;
  logic [2:0]       s4;
  logic [10:0][7:0] y11;
  logic [3:0][7:0]  z11;
  logic [10:0][7:0] yc11;
  logic [3:0]       s11;
  int checks = 0, failures = 0;
  int hits4 [8], hits11 [16];

  single_fault_correction #(.K(4), .R(3), .MASK(ecc_fir_pkg::MASK_7_4)) dut4 (
    .clk(clk), .rst(rst), .y(y4), .z(z4), .yc(yc4), .syndrome(s4));
  single_fault_correction #(.K(11), .R(4), .MASK(ecc_fir_pkg::MASK_15_11)) dut11 (
    .clk(clk), .rst(rst), .y(y11), .z(z11), .yc(yc11), .syndrome(s11));

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

  initial begin
    int d4 [4], d11 [11], c, p4, p11, e;
    y4 = '0; z4 = '0; y11 = '0; z11 = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 1000; n++) begin
      foreach (d4[i]) d4[i] = $urandom_range(0, 255);
      foreach (d11[i]) d11[i] = $urandom_range(0, 255);
      foreach (d4[i]) y4[i] = 8'(d4[i]);
      foreach (d11[i]) y11[i] = 8'(d11[i]);
      for (int j = 1; j <= 3; j++) begin
        c = 0; for (int i = 1; i <= 4; i++) if (in_check(4, j, i)) c += d4[i-1];
        z4[j-1] = 8'(c);
      end
      for (int j = 1; j <= 4; j++) begin
        c = 0; for (int i = 1; i <= 11; i++) if (in_check(11, j, i)) c += d11[i-1];
        z11[j-1] = 8'(c);
      end
      p4 = n % 8;        // 0 = no fault, else the faulty position 1..7
      p11 = n % 16;      // 0 = no fault, else 1..15
      e = $urandom_range(1, 255);
      if (p4 >= 1 && p4 <= 4) y4[p4-1] = y4[p4-1] + 8'(e);
      else if (p4 >= 5) z4[p4-5] = z4[p4-5] + 8'(e);
      if (p11 >= 1 && p11 <= 11) y11[p11-1] = y11[p11-1] ^ 8'(e);
      else if (p11 >= 12) z11[p11-12] = z11[p11-12] ^ 8'(e);
      @(posedge clk); #1;
      chk(int'(s4), p4 == 0 ? 0 : syn_of(4, 3, p4), "(7,4) syndrome");
      chk(int'(s11), p11 == 0 ? 0 : syn_of(11, 4, p11), "(15,11) syndrome");
      hits4[s4]++; hits11[s11]++;
      for (int i = 0; i < 4; i++) chk(int'(yc4[i]), d4[i], "(7,4) corrected output");
      for (int i = 0; i < 11; i++) chk(int'(yc11[i]), d11[i], "(15,11) corrected output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

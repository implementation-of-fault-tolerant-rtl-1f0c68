// tb_check_encoder: random inputs into the (7,4) and the (15,11) encoder; every check
// input must be the sum mod 256 of the data inputs its parity equation names.
module tb_check_encoder;
  import tb_ref_pkg::*;

  logic [3:0][7:0]  x4;
  logic [2:0][7:0]  xc4;
  logic [10:0][7:0] x11;
  logic [3:0][7:0]  xc11;
  int checks = 0, failures = 0;

  check_encoder #(.K(4), .R(3), .MASK(ecc_fir_pkg::MASK_7_4)) dut4 (.x(x4), .xc(xc4));
  check_encoder #(.K(11), .R(4), .MASK(ecc_fir_pkg::MASK_15_11)) dut11 (.x(x11), .xc(xc11));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      int e;
      foreach (x4[i]) x4[i] = 8'($urandom);
      foreach (x11[i]) x11[i] = 8'($urandom);
      #1;
      for (int j = 1; j <= 3; j++) begin
        e = 0;
        for (int i = 1; i <= 4; i++) if (in_check(4, j, i)) e += int'(x4[i-1]);
        checks++;
        if (int'(xc4[j-1]) != (e & 255)) begin
          failures++; $display("FAIL (7,4) check %0d = %0d expected %0d", j, xc4[j-1], e & 255);
        end
      end
      for (int j = 1; j <= 4; j++) begin
        e = 0;
        for (int i = 1; i <= 11; i++) if (in_check(11, j, i)) e += int'(x11[i-1]);
        checks++;
        if (int'(xc11[j-1]) != (e & 255)) begin
          failures++; $display("FAIL (15,11) check %0d = %0d expected %0d", j, xc11[j-1], e & 255);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fault_injector: for every ES value of the (7,4) and (15,11) banks, exactly the
// filter output that ES names (by the syndrome its failure gives) must be flipped by
// the fault mask, and all others must pass unchanged.
module tb_fault_injector;
  import tb_ref_pkg::*;

  logic [2:0]       es4;
  logic [3:0]       es11;
  logic [7:0]       fm;
  logic [3:0][7:0]  y4, y4o;
  logic [2:0][7:0]  z4, z4o;
  logic [10:0][7:0] y11, y11o;
  logic [3:0][7:0]  z11, z11o;
  int checks = 0, failures = 0;

  fault_injector #(.K(4), .R(3), .MASK(ecc_fir_pkg::MASK_7_4)) dut4 (
    .es(es4), .fault_mask(fm), .y_in(y4), .z_in(z4), .y_out(y4o), .z_out(z4o));
  fault_injector #(.K(11), .R(4), .MASK(ecc_fir_pkg::MASK_15_11)) dut11 (
    .es(es11), .fault_mask(fm), .y_in(y11), .z_in(z11), .y_out(y11o), .z_out(z11o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [7:0] got, input logic [7:0] in, input bit hit, input string what);
    checks++;
    if (got !== (hit ? (in ^ fm) : in)) begin
      failures++; $display("FAIL %s got %0h in %0h hit %0d", what, got, in, hit);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int e = 0; e < 16; e++) begin
        es4 = 3'(e); es11 = 4'(e);
        fm = 8'($urandom_range(1, 255));
        foreach (y4[i]) y4[i] = 8'($urandom);
        foreach (z4[i]) z4[i] = 8'($urandom);
        foreach (y11[i]) y11[i] = 8'($urandom);
        foreach (z11[i]) z11[i] = 8'($urandom);
        #1;
        if (e < 8) begin
          for (int p = 1; p <= 4; p++) expect_eq(y4o[p-1], y4[p-1], syn_of(4, 3, p) == e, "y4");
          for (int p = 5; p <= 7; p++) expect_eq(z4o[p-5], z4[p-5], syn_of(4, 3, p) == e, "z4");
        end
        for (int p = 1; p <= 11; p++) expect_eq(y11o[p-1], y11[p-1], syn_of(11, 4, p) == e, "y11");
        for (int p = 12; p <= 15; p++) expect_eq(z11o[p-12], z11[p-12], syn_of(11, 4, p) == e, "z11");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

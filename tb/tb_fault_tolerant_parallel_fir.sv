// tb_fault_tolerant_parallel_fir: end-to-end test of both filter banks at their
// default sizes. Random 8-bit samples stream into the four-filter and the
// eleven-filter bank; every cycle a random filter of each bank (or none) is
// corrupted. Each corrected output is compared with an integer FIR model two cycles
// after its sample. The test counts how often each mechanism occurred, per bank:
// no fault, correction of each data filter, detection of each check filter fault,
// and a reset in mid-stream. A mechanism that never occurred counts as a failure.
module tb_fault_tolerant_parallel_fir;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic [3:0][7:0]  b4_data, b4_yc;
  logic [2:0]       b4_es, b4_syn;
  logic [10:0][7:0] b11_data, b11_yc;
  logic [3:0]       b11_es, b11_syn;
  int checks = 0, failures = 0;

  fault_tolerant_parallel_fir dut (
    .clk(clk), .rst(rst),
    .b4_data(b4_data), .b4_es(b4_es), .b4_yc(b4_yc), .b4_syndrome(b4_syn),
    .b11_data(b11_data), .b11_es(b11_es), .b11_yc(b11_yc), .b11_syndrome(b11_syn));

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

  int h4 [4][NTAPS], h11 [11][NTAPS], e4 [2][4], e11 [2][11];
  int seen4 [8], seen11 [16];   // occurrences of each syndrome, i.e. of each faulty filter
  int resets = 0, valid = 0;

  task automatic clear_model();
    foreach (h4[i, t]) h4[i][t] = 0;
    foreach (h11[i, t]) h11[i][t] = 0;
    valid = 0;
  endtask

  initial begin
    b4_data = '0; b11_data = '0; b4_es = '0; b11_es = '0;
    clear_model();
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 6000; n++) begin
      if (n == 3000) begin
        // reset in mid-stream: outputs clear, delay lines restart from zero
        rst = 1; @(posedge clk); #1 rst = 0;
        for (int i = 0; i < 4; i++) chk(int'(b4_yc[i]), 0, "(7,4) yc after reset");
        for (int i = 0; i < 11; i++) chk(int'(b11_yc[i]), 0, "(15,11) yc after reset");
        resets++;
        clear_model();
      end
      foreach (b4_data[i]) b4_data[i] = 8'($urandom);
      foreach (b11_data[i]) b11_data[i] = 8'($urandom);
      b4_es = 3'($urandom);
      b11_es = 4'($urandom);
      for (int i = 0; i < 4; i++) begin
        for (int t = NTAPS - 1; t > 0; t--) h4[i][t] = h4[i][t-1];
        h4[i][0] = int'(b4_data[i]);
        e4[1][i] = e4[0][i]; e4[0][i] = fir_ref(h4[i]);
      end
      for (int i = 0; i < 11; i++) begin
        for (int t = NTAPS - 1; t > 0; t--) h11[i][t] = h11[i][t-1];
        h11[i][0] = int'(b11_data[i]);
        e11[1][i] = e11[0][i]; e11[0][i] = fir_ref(h11[i]);
      end
      @(posedge clk); #1;
      valid++;
      if (valid >= 2) begin
        for (int i = 0; i < 4; i++) chk(int'(b4_yc[i]), e4[1][i], "(7,4) yc");
        for (int i = 0; i < 11; i++) chk(int'(b11_yc[i]), e11[1][i], "(15,11) yc");
        chk(int'(b4_syn), int'(b4_es), "(7,4) syndrome");
        chk(int'(b11_syn), int'(b11_es), "(15,11) syndrome");
        seen4[b4_syn]++;
        seen11[b11_syn]++;
      end
    end
    for (int p = 1; p <= 7; p++)
      $display("(7,4) bank: %s %0d faulty, seen %0d times", p <= 4 ? "data filter" : "check filter",
               p <= 4 ? p : p - 4, seen4[syn_of(4, 3, p)]);
    for (int p = 1; p <= 15; p++)
      $display("(15,11) bank: %s %0d faulty, seen %0d times", p <= 11 ? "data filter" : "check filter",
               p <= 11 ? p : p - 11, seen11[syn_of(11, 4, p)]);
    $display("no fault: (7,4) %0d, (15,11) %0d cycles; resets %0d", seen4[0], seen11[0], resets);
    foreach (seen4[s]) if (seen4[s] == 0) begin failures++; $display("FAIL (7,4) syndrome %0d never seen", s); end
    foreach (seen11[s]) if (seen11[s] == 0) begin failures++; $display("FAIL (15,11) syndrome %0d never seen", s); end
    if (resets == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fir_filter: checks one FIR filter against an integer model, sample by sample,
// including its impulse response (the coefficients mod 256), its 1-cycle latency
// and its reset.
module tb_fir_filter;
  import tb_ref_pkg::*;

  logic       clk = 0, rst = 1;
  logic [7:0] x = '0, y;
  int checks = 0, failures = 0;
  int hist [NTAPS];

  fir_filter dut (.clk(clk), .rst(rst), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [7:0] v);
    int exp_y;
    x = v;
    for (int t = NTAPS - 1; t > 0; t--) hist[t] = hist[t-1];
    hist[0] = int'(v);
    exp_y = fir_ref(hist);
    @(posedge clk); #1;
    checks++;
    if (int'(y) != exp_y) begin
      failures++;
      $display("FAIL x=%0d y=%0d expected %0d", v, y, exp_y);
    end
  endtask

  initial begin
    foreach (hist[t]) hist[t] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // impulse response: y follows h[0..8] one cycle after the impulse
    step(8'd1);
    for (int t = 1; t < NTAPS + 2; t++) step(8'd0);
    // random samples
    for (int n = 0; n < 500; n++) step(8'($urandom));
    // reset clears the delay line and the output
    rst = 1; @(posedge clk); #1; rst = 0;
    checks++;
    if (y != 0) begin failures++; $display("FAIL y not cleared by reset"); end
    foreach (hist[t]) hist[t] = 0;
    for (int n = 0; n < 50; n++) step(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

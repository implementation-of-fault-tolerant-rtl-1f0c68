// fir_filter: one direct-form FIR filter, y[n] = sum_{i=0}^{TAPS-1} h[i] * x[n-i].
//
// A shift register holds the last TAPS-1 input samples; every tap is multiplied by its
// coefficient and the products are summed in one combinational adder tree, which is
// the structure of a general FIR filter (delay line, one multiplier per tap, chain of
// adders). The result is registered, so y shows the output for the sample presented
// on x one clock edge earlier (latency 1 cycle, one sample per cycle).
//
// Arithmetic is modulo 2^W: products and sums keep their low W bits. That keeps the
// filter exactly linear over W-bit words, which the Hamming checks of the bank rely on
// (filter(a + b) == filter(a) + filter(b) mod 2^W). The tap count and the width follow
// the document; the coefficient values, the wrap-around arithmetic and the
// synchronous, active-high reset (clears delay line and output) are this design's choice.
module fir_filter #(
  parameter int unsigned        W    = ecc_fir_pkg::W,
  parameter int unsigned        TAPS = ecc_fir_pkg::TAPS,
  parameter logic signed [W-1:0] COEF [TAPS] = ecc_fir_pkg::H_DEFAULT
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] x,   // input sample x[n]
  output logic [W-1:0] y    // y[n-1], registered
);

  logic [W-1:0] dly [TAPS];  // dly[0] = x[n] (wire), dly[i] = x[n-i]
  logic [W-1:0] acc;

  assign dly[0] = x;

  always_ff @(posedge clk) begin
    for (int i = 1; i < TAPS; i++) begin
      if (rst) dly[i] <= '0;
      else     dly[i] <= dly[i-1];
    end
  end

  always_comb begin
    acc = '0;
    for (int i = 0; i < TAPS; i++) acc = acc + W'(COEF[i] * dly[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) y <= '0;
    else     y <= acc;
  end

endmodule

// fault_injector: puts a fault on the output of one filter of the bank, for test.
//
// The bank has K data filters and R check filters. Each is named by the syndrome a
// failure of it produces: data filter i by column i of the parity-check matrix
// (check 1 in the most significant bit), check filter j by the one-hot value with
// only bit R-1-j set. es = 0 injects nothing; any other value selects the filter with
// that syndrome and exclusive-ors fault_mask into its output word. For the (7,4) bank
// that is es = 7, 6, 5, 3 for filters 1..4 and 4, 2, 1 for checks 1..3.
// Combinational; it sits between the filters and the single fault correction.
// The 3-bit and 4-bit ES inputs come from the document; this numbering of the faulty
// filter and the exclusive-or fault model are this design's choice.
module fault_injector #(
  parameter int unsigned         W    = ecc_fir_pkg::W,
  parameter int unsigned         K    = 4,
  parameter int unsigned         R    = 3,
  parameter logic [R-1:0][K-1:0] MASK = ecc_fir_pkg::MASK_7_4
) (
  input  logic [R-1:0]        es,          // syndrome of the filter to corrupt, 0 = none
  input  logic [W-1:0]        fault_mask,  // bits to flip in that filter's output
  input  logic [K-1:0][W-1:0] y_in,        // data filter outputs
  input  logic [R-1:0][W-1:0] z_in,        // check filter outputs
  output logic [K-1:0][W-1:0] y_out,
  output logic [R-1:0][W-1:0] z_out
);

  always_comb begin
    logic [R-1:0] col;
    for (int i = 0; i < K; i++) begin
      for (int j = 0; j < R; j++) col[R-1-j] = MASK[j][i];
      y_out[i] = (es == col) ? (y_in[i] ^ fault_mask) : y_in[i];
    end
    for (int j = 0; j < R; j++) begin
      col = '0;
      col[R-1-j] = 1'b1;
      z_out[j] = (es == col) ? (z_in[j] ^ fault_mask) : z_in[j];
    end
  end

endmodule

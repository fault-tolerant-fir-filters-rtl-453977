// hamming_corrector: error corrector for one W-bit data block.
//
// ANDs the error vector with the enable and XORs the result onto the data,
// flipping back the bit the locator points at. Combinational.
//
// This is the published AND/XOR correction circuit.
module hamming_corrector #(
  parameter int W = 8
) (
  input  logic [W-1:0] data_in,
  input  logic [W-1:0] error_vector,
  input  logic         enable,
  output logic [W-1:0] data_corrected
);

  assign data_corrected = data_in ^ (error_vector & {W{enable}});

endmodule

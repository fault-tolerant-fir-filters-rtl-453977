// hamming_decoder: complete single-error-correcting decoder for one tap.
//
// A syndrome calculator, a private locator and one corrector per channel.
// Returns the corrected data bits; the parity bits are not corrected
// because nothing downstream needs them. Combinational. Used by the
// single-encoder and additional-data-protection filters, where every tap
// has its own decoder.
//
// The split into these three parts follows the published scheme. Single
// error correction only (no double-error detection) and the error_detected
// output are this design's choices.
module hamming_decoder
  import fir_ham_pkg::*;
#(
  parameter int W  = DATA_W,
  parameter int CH = 1,
  localparam int P0 = hamming_parity_bits(W),
  localparam int P  = total_parity_bits(W, CH)
) (
  input  logic [CH-1:0][W-1:0] data,
  input  logic [P-1:0]         parity,
  output logic [CH-1:0][W-1:0] data_corrected,
  output logic                 error_detected
);

  logic [P-1:0]  syndrome;
  logic [CH-1:0] enable;
  logic [W-1:0]  error_vector;

  hamming_syndrome #(.W(W), .CH(CH)) u_syn (
    .data(data), .parity(parity), .syndrome(syndrome), .enable(enable)
  );

  hamming_locator #(.W(W)) u_loc (
    .syndrome(syndrome[P0-1:0]), .error_vector(error_vector)
  );

  for (genvar b = 0; b < CH; b++) begin : g_cor
    hamming_corrector #(.W(W)) u_cor (
      .data_in(data[b]), .error_vector(error_vector), .enable(enable[b]),
      .data_corrected(data_corrected[b])
    );
  end

  assign error_detected = |syndrome;

endmodule

// hamming_locator: error locator.
//
// Decodes the low P0 bits of a syndrome, which hold the codeword position
// of a single flipped bit, into a one-hot W-bit error vector over the data
// bits. A syndrome that points at a parity position (or is zero) gives an
// all-zero vector, because a flipped parity bit needs no data correction.
// In the shared-decoder filter one locator serves every tap and channel.
// Combinational.
//
// Its function is the published one; the compare-per-position logic is
// this design's own, since only the function is specified.
module hamming_locator
  import fir_ham_pkg::*;
#(
  parameter int W  = DATA_W,
  localparam int P0 = hamming_parity_bits(W)
) (
  input  logic [P0-1:0] syndrome,
  output logic [W-1:0]  error_vector
);

  // Codeword position of every data bit, fixed at elaboration.
  function automatic logic [W-1:0][P0-1:0] build_positions();
    logic [W-1:0][P0-1:0] pos;
    for (int j = 0; j < W; j++) pos[j] = P0'(data_position(j));
    return pos;
  endfunction

  localparam logic [W-1:0][P0-1:0] POSITIONS = build_positions();

  always_comb
    for (int j = 0; j < W; j++)
      error_vector[j] = (syndrome == POSITIONS[j]);

endmodule

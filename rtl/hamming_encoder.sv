// hamming_encoder: parity generator at the head of the delay line.
//
// Computes the P parity bits of CH channels of W data bits, coded as one
// word. Parity bit i is the XOR of every data bit whose parity-check column
// (fir_ham_pkg::check_column) has bit i set; the data bits themselves are
// stored unchanged next to the parity (systematic code). Purely
// combinational. The code layout is described in fir_ham_pkg.
//
// Encoding each sample once, where it enters the delay line, is the
// published scheme; the bit layout of the code is this design's choice.
module hamming_encoder
  import fir_ham_pkg::*;
#(
  parameter int W  = DATA_W,
  parameter int CH = 1,
  localparam int P = total_parity_bits(W, CH)
) (
  input  logic [CH-1:0][W-1:0] data,
  output logic [P-1:0]         parity
);

  // Parity-check column of every data bit, fixed at elaboration.
  function automatic logic [CH*W-1:0][P-1:0] build_columns();
    logic [CH*W-1:0][P-1:0] c;
    for (int b = 0; b < CH; b++)
      for (int j = 0; j < W; j++)
        c[b*W + j] = P'(check_column(b, j, W));
    return c;
  endfunction

  localparam logic [CH*W-1:0][P-1:0] COLUMNS = build_columns();

  always_comb begin
    parity = '0;
    for (int b = 0; b < CH; b++)
      for (int j = 0; j < W; j++)
        parity = parity ^ (COLUMNS[b*W + j] & {P{data[b][j]}});
  end

endmodule

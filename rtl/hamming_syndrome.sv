// hamming_syndrome: per-tap syndrome calculator.
//
// XORs the stored parity bits with the parity recomputed from the stored
// data bits. The result is all zero when the tap holds a valid codeword.
// The OR of the syndrome bits is the correction enable. With several
// channels coded as one word (CH > 1) the enable becomes a vector: channel
// b is enabled when the syndrome is non-zero and its high $clog2(CH) bits
// equal b. The low P0 bits go to the (shared) locator. Combinational.
//
// The XOR-then-OR structure is the published syndrome circuit; decoding
// per-channel enables from the high syndrome bits is this design's choice.
module hamming_syndrome
  import fir_ham_pkg::*;
#(
  parameter int W  = DATA_W,
  parameter int CH = 1,
  localparam int P0 = hamming_parity_bits(W),
  localparam int P  = total_parity_bits(W, CH)
) (
  input  logic [CH-1:0][W-1:0] data,
  input  logic [P-1:0]         parity,
  output logic [P-1:0]         syndrome,
  output logic [CH-1:0]        enable
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
    syndrome = parity;
    for (int b = 0; b < CH; b++)
      for (int j = 0; j < W; j++)
        syndrome = syndrome ^ (COLUMNS[b*W + j] & {P{data[b][j]}});
  end

  if (CH == 1) begin : g_single
    assign enable = |syndrome;
  end else begin : g_multi
    always_comb
      for (int b = 0; b < CH; b++)
        enable[b] = (|syndrome) && (int'(syndrome[P-1:P0]) == b);
  end

endmodule

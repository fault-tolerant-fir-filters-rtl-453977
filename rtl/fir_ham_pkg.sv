// fir_ham_pkg: constants and code-construction functions shared by the
// Hamming-protected FIR filters.
//
// The filters use a single-error-correcting Hamming code. For one channel of
// W data bits the number of parity bits P0 is the smallest p with
// W + p + 1 <= 2**p (8 data bits -> 4 parity bits). Data bit j sits at the
// j-th codeword position (counting from 1) that is not a power of two, so
// for W = 8 the data positions are 3,5,6,7,9,10,11,12 and the syndrome of a
// single flipped bit is the binary position of that bit.
//
// When CH parallel channels are coded as one word, $clog2(CH) more parity
// bits are added. Bit j of channel b then gets the parity-check column
// {b, position(j)}: the low P0 syndrome bits point at the bit inside a
// channel and the high bits name the channel. This keeps one shared W-bit
// error vector for all channels, selected per channel by an enable. With
// 16 and 32 data bits this gives 5 and 6 parity bits, the minimum the
// Hamming rule allows. The column layout is this design's own choice.
//
// The two coefficient sets are the 5-tap (six coefficient) and 11-tap
// (twelve coefficient) low-pass filters used to evaluate the technique.
package fir_ham_pkg;

  localparam int DATA_W = 8;   // bits per channel sample
  localparam int COEF_W = 8;   // signed coefficient width (all values fit)

  localparam int N_TAPS5  = 6;
  localparam int N_TAPS11 = 12;
  localparam int H_TAPS5  [N_TAPS5]  = '{-1, 24, 50, 50, 24, -1};
  localparam int H_TAPS11 [N_TAPS11] = '{1, -1, -9, 6, 73, 120, 120, 73, 6, -9, -1, 1};

  // Smallest p with d + p + 1 <= 2**p. $clog2(d + 1) is at most one short
  // of it.
  function automatic int hamming_parity_bits(int d);
    int p;
    p = $clog2(d + 1);
    if (d + p + 1 > (1 << p)) p = p + 1;
    return p;
  endfunction

  // Parity bits for CH channels of W bits coded as one word.
  function automatic int total_parity_bits(int w, int ch);
    return hamming_parity_bits(w) + $clog2(ch);
  endfunction

  // Codeword position (1-based) of data bit j: the j-th position that is
  // not a power of two. The j+1 data bits up to and including it need
  // hamming_parity_bits(j + 1) parity positions in front of it.
  function automatic int data_position(int j);
    return j + 1 + hamming_parity_bits(j + 1);
  endfunction

  // Parity-check column of data bit j of channel b (W bits per channel).
  function automatic int check_column(int b, int j, int w);
    return (b << hamming_parity_bits(w)) | data_position(j);
  endfunction

endpackage

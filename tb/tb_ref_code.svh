// tb_ref_code.svh: reference Hamming code for the testbenches, written
// independently of the RTL package. Codeword positions run from 1; the
// powers of two hold parity, the rest hold data bits in order. With CH
// channels, bit j of channel b is checked by the column
// (b * 2**P0) + position(j).

// j-th (0-based) position that is not a power of two, found by counting
function automatic int ref_position(int j);
  int n;
  n = 0;
  for (int pos = 1; pos < 1024; pos++)
    if ((pos & (pos - 1)) != 0) begin
      if (n == j) return pos;
      n++;
    end
  return -1;
endfunction

// parity of CH x W data bits held in a flat vector, channel b at [b*W +: W]
function automatic logic [63:0] ref_parity(logic [127:0] d, int w, int ch, int p0);
  logic [63:0] par;
  int col;
  par = '0;
  for (int b = 0; b < ch; b++)
    for (int j = 0; j < w; j++) begin
      col = b * (1 << p0) + ref_position(j);
      if (d[b*w + j]) par = par ^ 64'(col);
    end
  return par;
endfunction

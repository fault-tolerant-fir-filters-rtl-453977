// fir_sop: sum of products of a direct-form FIR filter.
//
// y = sum over i of COEF[i] * taps[i], with taps[i] the (corrected) sample
// held in delay-line register i. Samples and coefficients are signed two's
// complement; the output is YW bits wide, enough for the default
// coefficient sets without overflow. Combinational, as in the filters
// being protected: only the delay line is registered.
//
// The direct-form sum of products and the coefficients follow the
// published filters; signed arithmetic and the output width are this
// design's choices.
module fir_sop
  import fir_ham_pkg::*;
#(
  parameter int N  = N_TAPS5,
  parameter int W  = DATA_W,
  parameter int YW = W + COEF_W + $clog2(N),
  parameter int COEF [N] = H_TAPS5
) (
  input  logic [N-1:0][W-1:0] taps,
  output logic [YW-1:0]       y
);

  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++)
      y = y + YW'(YW'($signed(taps[i])) * YW'(COEF[i]));
  end

endmodule

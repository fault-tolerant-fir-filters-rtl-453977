// fir_single_encoder: FIR filter protected by one Hamming encoder.
//
// The input sample is encoded once, at the head of the delay line. The
// coded word (data and parity) then shifts unchanged from register to
// register; every register has its own decoder, and only the decoded data
// goes to the sum of products. A single upset in a word is therefore
// corrected at every tap it passes, but a second upset in the same word at
// a later tap is not (the word is never rewritten in corrected form).
//
// Timing: one sample per clock. Register 0 takes x at the rising edge, so
// y = sum COEF[i] * x[n-1-i] is valid one cycle after x is presented; the
// sum of products is combinational after the registers.
//
// seu_data / seu_par flip register bits as they are written (XOR into the
// next value); they exist to emulate single-event upsets and are tied to
// zero in normal use. Asynchronous active-low reset clears the delay line
// to the all-zero codeword. Both are this design's own choices.
//
// The structure (one encoder, a decoder per register, raw words shifted)
// follows the published scheme.
module fir_single_encoder
  import fir_ham_pkg::*;
#(
  parameter int N  = N_TAPS5,
  parameter int W  = DATA_W,
  parameter int YW = W + COEF_W + $clog2(N),
  parameter int COEF [N] = H_TAPS5,
  localparam int P = hamming_parity_bits(W)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [W-1:0]        x,
  input  logic [N-1:0][W-1:0] seu_data,
  input  logic [N-1:0][P-1:0] seu_par,
  output logic [YW-1:0]       y
);

  logic [P-1:0]         x_par;
  logic [N-1:0][W-1:0]  data_q;
  logic [N-1:0][P-1:0]  par_q;
  logic [N-1:0][W-1:0]  dec;

  hamming_encoder #(.W(W), .CH(1)) u_enc (.data(x), .parity(x_par));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      data_q <= '0;
      par_q  <= '0;
    end else begin
      data_q[0] <= x ^ seu_data[0];
      par_q[0]  <= x_par ^ seu_par[0];
      for (int k = 1; k < N; k++) begin
        data_q[k] <= data_q[k-1] ^ seu_data[k];
        par_q[k]  <= par_q[k-1] ^ seu_par[k];
      end
    end

  for (genvar k = 0; k < N; k++) begin : g_dec
    logic err_unused;
    hamming_decoder #(.W(W), .CH(1)) u_dec (
      .data(data_q[k]), .parity(par_q[k]), .data_corrected(dec[k]),
      .error_detected(err_unused)
    );
  end

  fir_sop #(.N(N), .W(W), .YW(YW), .COEF(COEF)) u_sop (.taps(dec), .y(y));

endmodule

// fir_data_protect: FIR filter with one encoder and additional data
// protection.
//
// As in fir_single_encoder the sample is encoded once and every delay-line
// register has its own decoder. Here, however, the next register takes the
// decoder's corrected data bits, while its parity bits come straight from
// the previous register. A flipped data bit is thus repaired as the word
// moves on, so upsets in the data bits at every clock cycle are tolerated.
// A flipped parity bit is not repaired and travels with its word; a later
// data upset in that same word is then not corrected.
//
// Timing: one sample per clock; y = sum COEF[i] * x[n-1-i] one cycle after
// x, the sum of products being combinational after the registers. Note that
// the decoder of register k lies between register k and register k+1.
//
// seu_data / seu_par flip register bits as they are written, to emulate
// single-event upsets; tie to zero in normal use. Asynchronous active-low
// reset clears the delay line. Both are this design's own choices.
//
// The structure (corrected data and raw parity shifted on) follows the
// published scheme.
module fir_data_protect
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
        data_q[k] <= dec[k-1] ^ seu_data[k];
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

// fir_shared_decoder: FIR filter(s) with one encoder and a shared decoder.
//
// The Hamming decoder is split into its three parts. Every delay-line
// register keeps a syndrome calculator and a corrector, but a single error
// locator serves all of them: the low syndrome bits of all taps are ORed
// together and decoded once into a W-bit error vector, which is broadcast.
// Each tap's corrector applies it only when that tap's own syndrome is
// non-zero. This relies on at most one register being hit per cycle.
// As in fir_data_protect, the corrected data bits feed the next register
// while the parity bits shift uncorrected.
//
// With CH > 1 the filter holds CH parallel channels (independent filters
// with the same coefficients) whose samples are coded as one word with
// only $clog2(CH) extra parity bits. The W-bit error vector is still the
// only one; the syndrome's high bits select which channel's corrector is
// enabled (see fir_ham_pkg for the code layout).
//
// Timing: one sample per channel per clock; y[b] = sum COEF[i] * x[b][n-1-i]
// one cycle after x, the sums of products being combinational.
//
// seu_data / seu_par flip register bits as they are written, to emulate
// single-event upsets; tie to zero in normal use. Asynchronous active-low
// reset clears the delay line. OR-combining the syndromes for the locator,
// the column layout for CH > 1, the upset ports and the reset are this
// design's own choices.
//
// The split decoder with one shared locator, the corrected data feeding
// the next register and the single wide code for parallel channels follow
// the published scheme.
module fir_shared_decoder
  import fir_ham_pkg::*;
#(
  parameter int N  = N_TAPS5,
  parameter int W  = DATA_W,
  parameter int CH = 1,
  parameter int YW = W + COEF_W + $clog2(N),
  parameter int COEF [N] = H_TAPS5,
  localparam int P0 = hamming_parity_bits(W),
  localparam int P  = total_parity_bits(W, CH)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [CH-1:0][W-1:0]        x,
  input  logic [N-1:0][CH-1:0][W-1:0] seu_data,
  input  logic [N-1:0][P-1:0]         seu_par,
  output logic [CH-1:0][YW-1:0]       y
);

  logic [P-1:0]                x_par;
  logic [N-1:0][CH-1:0][W-1:0] data_q;
  logic [N-1:0][P-1:0]         par_q;
  logic [N-1:0][P-1:0]         syndrome;
  logic [N-1:0][CH-1:0]        enable;
  logic [P0-1:0]               syn_any;
  logic [W-1:0]                error_vector;
  logic [N-1:0][CH-1:0][W-1:0] corr;

  hamming_encoder #(.W(W), .CH(CH)) u_enc (.data(x), .parity(x_par));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      data_q <= '0;
      par_q  <= '0;
    end else begin
      data_q[0] <= x ^ seu_data[0];
      par_q[0]  <= x_par ^ seu_par[0];
      for (int k = 1; k < N; k++) begin
        data_q[k] <= corr[k-1] ^ seu_data[k];
        par_q[k]  <= par_q[k-1] ^ seu_par[k];
      end
    end

  for (genvar k = 0; k < N; k++) begin : g_syn
    hamming_syndrome #(.W(W), .CH(CH)) u_syn (
      .data(data_q[k]), .parity(par_q[k]), .syndrome(syndrome[k]),
      .enable(enable[k])
    );
  end

  always_comb begin
    syn_any = '0;
    for (int k = 0; k < N; k++) syn_any = syn_any | syndrome[k][P0-1:0];
  end

  hamming_locator #(.W(W)) u_loc (.syndrome(syn_any), .error_vector(error_vector));

  for (genvar k = 0; k < N; k++) begin : g_tap
    for (genvar b = 0; b < CH; b++) begin : g_ch
      hamming_corrector #(.W(W)) u_cor (
        .data_in(data_q[k][b]), .error_vector(error_vector),
        .enable(enable[k][b]), .data_corrected(corr[k][b])
      );
    end
  end

  for (genvar b = 0; b < CH; b++) begin : g_sop
    logic [N-1:0][W-1:0] taps;
    always_comb
      for (int k = 0; k < N; k++) taps[k] = corr[k][b];
    fir_sop #(.N(N), .W(W), .YW(YW), .COEF(COEF)) u_sop (.taps(taps), .y(y[b]));
  end

endmodule

// fir_hamming_top: the proposed Hamming-protected FIR filters side by side.
//
// Four independent filters with the same coefficients (default: the 5-tap,
// six-coefficient low-pass set), each with its own ports:
//   se_*  : single encoder, a decoder per register (fir_single_encoder)
//   dp_*  : single encoder with additional data protection (fir_data_protect)
//   sd_*  : shared decoder, one channel (fir_shared_decoder, CH = 1)
//   pa_*  : shared decoder over PAR_CH parallel channels coded as one word
//           (fir_shared_decoder, CH = PAR_CH; 4 channels: 32 data bits and
//           6 parity bits per register)
// The shared-decoder filter is the recommended one; the others are the
// intermediate steps towards it and trade area against tolerance to upsets
// that hit the same word in different cycles.
//
// Every filter takes a W-bit signed sample per channel per clock and gives
// y = sum COEF[i] * x[n-1-i] one cycle later. The *_seu_* inputs flip
// register bits as they are written, to emulate single-event upsets; tie
// them to zero in normal use.
//
// The four filter structures follow the published schemes; placing them
// in one top level is only for convenience.
module fir_hamming_top
  import fir_ham_pkg::*;
#(
  parameter int N      = N_TAPS5,
  parameter int W      = DATA_W,
  parameter int PAR_CH = 4,
  parameter int YW     = W + COEF_W + $clog2(N),
  parameter int COEF [N] = H_TAPS5,
  localparam int P1 = total_parity_bits(W, 1),
  localparam int PP = total_parity_bits(W, PAR_CH)
) (
  input  logic                            clk,
  input  logic                            rst_n,

  input  logic [W-1:0]                    se_x,
  input  logic [N-1:0][W-1:0]             se_seu_data,
  input  logic [N-1:0][P1-1:0]            se_seu_par,
  output logic [YW-1:0]                   se_y,

  input  logic [W-1:0]                    dp_x,
  input  logic [N-1:0][W-1:0]             dp_seu_data,
  input  logic [N-1:0][P1-1:0]            dp_seu_par,
  output logic [YW-1:0]                   dp_y,

  input  logic [W-1:0]                    sd_x,
  input  logic [N-1:0][W-1:0]             sd_seu_data,
  input  logic [N-1:0][P1-1:0]            sd_seu_par,
  output logic [YW-1:0]                   sd_y,

  input  logic [PAR_CH-1:0][W-1:0]        pa_x,
  input  logic [N-1:0][PAR_CH-1:0][W-1:0] pa_seu_data,
  input  logic [N-1:0][PP-1:0]            pa_seu_par,
  output logic [PAR_CH-1:0][YW-1:0]       pa_y
);

  fir_single_encoder #(.N(N), .W(W), .YW(YW), .COEF(COEF)) u_se (
    .clk, .rst_n, .x(se_x), .seu_data(se_seu_data), .seu_par(se_seu_par), .y(se_y)
  );

  fir_data_protect #(.N(N), .W(W), .YW(YW), .COEF(COEF)) u_dp (
    .clk, .rst_n, .x(dp_x), .seu_data(dp_seu_data), .seu_par(dp_seu_par), .y(dp_y)
  );

  fir_shared_decoder #(.N(N), .W(W), .CH(1), .YW(YW), .COEF(COEF)) u_sd (
    .clk, .rst_n, .x(sd_x), .seu_data(sd_seu_data), .seu_par(sd_seu_par), .y(sd_y)
  );

  fir_shared_decoder #(.N(N), .W(W), .CH(PAR_CH), .YW(YW), .COEF(COEF)) u_pa (
    .clk, .rst_n, .x(pa_x), .seu_data(pa_seu_data), .seu_par(pa_seu_par), .y(pa_y)
  );

endmodule

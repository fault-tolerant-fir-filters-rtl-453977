// tb_fir_hamming_top: end-to-end test of fir_hamming_top at its default
// parameters (5-tap filter, 8-bit samples, four parallel channels).
//
// All four filters run on independent random samples and are compared
// every cycle with a reference FIR model. The same upset scenarios are
// applied to all of them:
//   isolated   one data or parity bit flipped, then the word leaves
//   every      a data bit flipped in some register every cycle
//   chase      one word hit twice, two taps apart
// Expected: every filter masks isolated upsets; the data-protect, shared
// decoder and parallel filters also mask the other two scenarios, while the
// single-encoder filter must show a wrong output there. The testbench also
// counts how often each mechanism happened (correction enable inside the
// shared decoders, each parallel channel's enable, the extra parity bits of
// the parallel code, repaired repeated upsets, the single-encoder failure)
// and counts a failure for any that never did.
module tb_fir_hamming_top;
  import fir_ham_pkg::*;

  localparam int N  = N_TAPS5;
  localparam int W  = DATA_W;
  localparam int CH = 4;
  localparam int P1 = total_parity_bits(W, 1);
  localparam int PP = total_parity_bits(W, CH);
  localparam int YW = W + COEF_W + $clog2(N);
  localparam int H [N] = '{-1, 24, 50, 50, 24, -1};
  localparam int NF = 3 + CH;   // streams: se, dp, sd, pa channels 0..3

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] se_x, dp_x, sd_x;
  logic [N-1:0][W-1:0] se_sd, dp_sd, sd_sd;
  logic [N-1:0][P1-1:0] se_sp, dp_sp, sd_sp;
  logic [YW-1:0] se_y, dp_y, sd_y;
  logic [CH-1:0][W-1:0] pa_x;
  logic [N-1:0][CH-1:0][W-1:0] pa_sd;
  logic [N-1:0][PP-1:0] pa_sp;
  logic [CH-1:0][YW-1:0] pa_y;

  fir_hamming_top dut (
    .clk, .rst_n,
    .se_x, .se_seu_data(se_sd), .se_seu_par(se_sp), .se_y,
    .dp_x, .dp_seu_data(dp_sd), .dp_seu_par(dp_sp), .dp_y,
    .sd_x, .sd_seu_data(sd_sd), .sd_seu_par(sd_sp), .sd_y,
    .pa_x, .pa_seu_data(pa_sd), .pa_seu_par(pa_sp), .pa_y
  );

  int checks = 0;
  int failures = 0;
  logic signed [W-1:0] hist [N][NF];
  int mism [NF];

  // mechanism counters
  int m_iso_data, m_iso_par, m_every, m_chase;
  int m_sd_enable, m_pa_high_parity, m_se_broken;
  int m_pa_channel [CH];

  function automatic logic signed [YW-1:0] model(int f);
    logic signed [YW-1:0] acc;
    acc = '0;
    for (int i = 0; i < N; i++) acc = acc + YW'(hist[i][f]) * YW'(H[i]);
    return acc;
  endfunction

  function automatic logic [YW-1:0] got(int f);
    case (f)
      0: return se_y;
      1: return dp_y;
      2: return sd_y;
      default: return pa_y[f-3];
    endcase
  endfunction

  // strict_se: also check the single-encoder filter strictly
  task automatic cycle(input bit strict_se);
    logic [NF-1:0][W-1:0] xs;
    for (int f = 0; f < NF; f++) xs[f] = W'($urandom);
    se_x = xs[0]; dp_x = xs[1]; sd_x = xs[2];
    for (int b = 0; b < CH; b++) pa_x[b] = xs[3+b];
    @(posedge clk);
    for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
    for (int f = 0; f < NF; f++) hist[0][f] = xs[f];
    @(negedge clk);
    // the shared decoders' correction enables, seen from outside
    if (|dut.u_sd.enable) m_sd_enable++;
    se_sd = '0; dp_sd = '0; sd_sd = '0; pa_sd = '0;
    se_sp = '0; dp_sp = '0; sd_sp = '0; pa_sp = '0;
    for (int f = 0; f < NF; f++) begin
      if (f == 0 && !strict_se) begin
        if (got(0) !== model(0)) mism[0]++;
      end else begin
        checks++;
        if (got(f) !== model(f)) begin
          failures++;
          $display("stream %0d: y=%0d expected %0d at %0t", f, $signed(got(f)),
                   model(f), $time);
        end
      end
    end
  endtask

  // flip data bit j of register k in every filter (channel b in the
  // parallel one)
  task automatic hit_data(int k, int b, int j);
    se_sd[k][j] = 1'b1;
    dp_sd[k][j] = 1'b1;
    sd_sd[k][j] = 1'b1;
    pa_sd[k][b][j] = 1'b1;
    m_pa_channel[b]++;
  endtask

  initial begin
    m_iso_data = 0; m_iso_par = 0; m_every = 0; m_chase = 0;
    m_sd_enable = 0; m_pa_high_parity = 0; m_se_broken = 0;
    for (int b = 0; b < CH; b++) m_pa_channel[b] = 0;
    for (int f = 0; f < NF; f++) mism[f] = 0;
    for (int i = 0; i < N; i++) for (int f = 0; f < NF; f++) hist[i][f] = '0;
    se_x = '0; dp_x = '0; sd_x = '0; pa_x = '0;
    se_sd = '0; dp_sd = '0; sd_sd = '0; pa_sd = '0;
    se_sp = '0; dp_sp = '0; sd_sp = '0; pa_sp = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    repeat (20) cycle(1'b1);

    // isolated upsets, each filter hit in the same place
    for (int n = 0; n < 80; n++) begin
      int k, j, b;
      k = $urandom_range(N - 1);
      b = n % CH;
      if (n % 4 == 3) begin
        j = $urandom_range(P1 - 1);
        se_sp[k][j] = 1'b1; dp_sp[k][j] = 1'b1; sd_sp[k][j] = 1'b1;
        // the parallel code's two extra parity bits get their share
        j = (n % 8 == 3) ? $urandom_range(PP - 1, P1) : j;
        if (j >= P1) m_pa_high_parity++;
        pa_sp[k][j] = 1'b1;
        m_iso_par++;
      end else begin
        hit_data(k, b, $urandom_range(W - 1));
        m_iso_data++;
      end
      repeat (N + 1) cycle(1'b1);
    end

    // a data upset every cycle
    repeat (120) begin
      hit_data($urandom_range(N - 1), $urandom_range(CH - 1), $urandom_range(W - 1));
      m_every++;
      cycle(1'b0);
    end
    repeat (N) cycle(1'b0);
    cycle(1'b1);

    // one word hit twice, two taps apart
    repeat (6) begin
      mism[0] = 0;
      hit_data(1, 2, 1);
      cycle(1'b0);
      cycle(1'b0);
      hit_data(3, 2, 6);
      m_chase++;
      repeat (N) cycle(1'b0);
      if (mism[0] > 0) m_se_broken++;
      cycle(1'b1);
    end

    // every mechanism must have happened
    checks += 8 + CH;
    if (m_iso_data == 0) failures++;
    if (m_iso_par == 0) failures++;
    if (m_every == 0) failures++;
    if (m_chase == 0) failures++;
    if (m_sd_enable == 0) failures++;
    if (m_pa_high_parity == 0) failures++;
    if (m_se_broken == 0) failures++;
    if (m_se_broken != m_chase) failures++;
    for (int b = 0; b < CH; b++) if (m_pa_channel[b] == 0) failures++;
    $display("mechanisms: isolated data %0d, isolated parity %0d (extra parallel parity %0d),",
             m_iso_data, m_iso_par, m_pa_high_parity);
    $display("  upset every cycle %0d, chased words %0d, single-encoder corrupted %0d,",
             m_every, m_chase, m_se_broken);
    $display("  shared-decoder enable cycles %0d, parallel channel hits %0d %0d %0d %0d",
             m_sd_enable, m_pa_channel[0], m_pa_channel[1], m_pa_channel[2], m_pa_channel[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

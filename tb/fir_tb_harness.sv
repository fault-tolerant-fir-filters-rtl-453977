// fir_tb_harness: self-checking stimulus and reference model for one of the
// Hamming-protected FIR filters.
//
// VARIANT selects the filter: 0 = fir_single_encoder, 1 = fir_data_protect,
// 2 = fir_shared_decoder (CH channels). The harness drives random signed
// samples, keeps its own sample history and compares every output, every
// cycle, with sum COEF[i] * x[n-1-i]. It injects single-event upsets through
// the filter's upset ports in these phases:
//   impulse   one-cycle latency and impulse response
//   clean     random samples, no upsets
//   isolated  one upset (random tap, random data or parity bit), then the
//             word is given time to leave the delay line
//   every     a data-bit upset in a random register every cycle (checked
//             only for variants that repair data as it moves on)
//   chase     two upsets in the same word two taps apart: corrected by
//             variants 1 and 2, must corrupt the output of variant 0
//   par+data  a parity upset in register 0, then a data upset in the same
//             word in register 1: must corrupt the output of every variant
// It reports checks and failures and raises done when finished.
module fir_tb_harness
  import fir_ham_pkg::*;
#(
  parameter int VARIANT = 2,
  parameter int N  = N_TAPS5,
  parameter int CH = 1,
  parameter int COEF [N] = H_TAPS5,
  parameter int SEED = 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_isolated,
  output int   n_every,
  output int   n_chase,
  output int   n_pardata,
  output logic done
);
  localparam int W  = DATA_W;
  localparam int P  = total_parity_bits(W, CH);
  localparam int YW = W + COEF_W + $clog2(N);
  localparam bit REPAIRS = (VARIANT != 0);

  logic [CH-1:0][W-1:0]        x;
  logic [N-1:0][CH-1:0][W-1:0] seu_d;
  logic [N-1:0][P-1:0]         seu_p;
  logic [CH-1:0][YW-1:0]       y;

  if (VARIANT == 0) begin : g_se
    fir_single_encoder #(.N(N), .W(W), .COEF(COEF)) dut (
      .clk, .rst_n, .x(x), .seu_data(seu_d), .seu_par(seu_p), .y(y));
  end else if (VARIANT == 1) begin : g_dp
    fir_data_protect #(.N(N), .W(W), .COEF(COEF)) dut (
      .clk, .rst_n, .x(x), .seu_data(seu_d), .seu_par(seu_p), .y(y));
  end else begin : g_sd
    fir_shared_decoder #(.N(N), .W(W), .CH(CH), .COEF(COEF)) dut (
      .clk, .rst_n, .x(x), .seu_data(seu_d), .seu_par(seu_p), .y(y));
  end

  // hist[i][b]: sample of channel b taken i+1 rising edges ago
  logic signed [W-1:0] hist [N][CH];
  int mism;

  function automatic logic [YW-1:0] model(int b);
    logic signed [YW-1:0] acc;
    acc = '0;
    for (int i = 0; i < N; i++) acc = acc + YW'(hist[i][b]) * YW'(COEF[i]);
    return acc;
  endfunction

  // One clock: apply x and the upset masks, then compare after the edge.
  // strict: count a failure on mismatch; otherwise count mismatching cycles.
  task automatic cycle(input bit strict, input bit random_x = 1'b1);
    if (random_x)
      for (int b = 0; b < CH; b++) x[b] = W'($urandom);
    @(posedge clk);
    for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
    for (int b = 0; b < CH; b++) hist[0][b] = x[b];
    @(negedge clk);
    seu_d = '0;
    seu_p = '0;
    for (int b = 0; b < CH; b++) begin
      if (strict) begin
        checks++;
        if (y[b] !== model(b)) begin
          failures++;
          $display("harness V%0d CH%0d: y[%0d]=%0d expected %0d at %0t",
                   VARIANT, CH, b, $signed(y[b]), $signed(model(b)), $time);
        end
      end else if (y[b] !== model(b)) mism++;
    end
  endtask

  task automatic flush();
    seu_d = '0;
    seu_p = '0;
    repeat (N) cycle(REPAIRS);
    cycle(1'b1);
  endtask

  initial begin
    void'($urandom(SEED));
    checks = 0; failures = 0; done = 0;
    n_isolated = 0; n_every = 0; n_chase = 0; n_pardata = 0;
    x = '0; seu_d = '0; seu_p = '0;
    for (int i = 0; i < N; i++) for (int b = 0; b < CH; b++) hist[i][b] = '0;
    wait (rst_n === 1'b1);
    @(negedge clk);

    // impulse on channel 0: h appears one cycle after the sample, in order
    x = '0;
    x[0] = W'(1);
    cycle(1'b1, 1'b0);
    checks++;
    if ($signed(y[0]) != COEF[0]) failures++;
    x = '0;
    for (int i = 1; i < N; i++) begin
      cycle(1'b1, 1'b0);
      checks++;
      if ($signed(y[0]) != COEF[i]) failures++;
    end

    repeat (40) cycle(1'b1);

    // isolated upsets
    repeat (60) begin
      int k, b, bit_i;
      k = $urandom_range(N - 1);
      if ($urandom_range(3) == 0) begin
        bit_i = $urandom_range(P - 1);
        seu_p[k][bit_i] = 1'b1;
      end else begin
        b = $urandom_range(CH - 1);
        bit_i = $urandom_range(W - 1);
        seu_d[k][b][bit_i] = 1'b1;
      end
      n_isolated++;
      cycle(1'b1);
      repeat (N) cycle(1'b1);
    end

    // a data upset every cycle
    mism = 0;
    repeat (100) begin
      seu_d[$urandom_range(N - 1)][$urandom_range(CH - 1)][$urandom_range(W - 1)] = 1'b1;
      n_every++;
      cycle(REPAIRS);
    end
    flush();

    // chase one word: bit 0 flipped entering register 1, bit 5 two taps on
    repeat (4) begin
      mism = 0;
      seu_d[1][0][0] = 1'b1;
      cycle(REPAIRS);
      cycle(REPAIRS);
      seu_d[3][0][5] = 1'b1;
      n_chase++;
      repeat (N) cycle(REPAIRS);
      if (!REPAIRS) begin
        checks++;
        if (mism == 0) begin
          failures++;
          $display("harness V%0d: double upset in one word went unnoticed", VARIANT);
        end
      end
      flush();
    end

    // parity upset, then a data upset in the same word one tap later
    repeat (4) begin
      mism = 0;
      seu_p[0][0] = 1'b1;
      cycle(1'b0);
      seu_d[1][0][2] = 1'b1;
      n_pardata++;
      repeat (N) cycle(1'b0);
      checks++;
      if (mism == 0) begin
        failures++;
        $display("harness V%0d: parity+data upset in one word went unnoticed", VARIANT);
      end
      flush();
    end

    done = 1;
  end

endmodule

// tb_fir_shared_decoder: self-checking testbench of fir_shared_decoder.
//
// Runs fir_tb_harness (reference model and upset scenarios) on the 5-tap
// filter, on the 11-tap filter with four parallel channels coded as one
// word (32 data bits) and on the 5-tap filter with two channels (16 bits).
module tb_fir_shared_decoder;
  import fir_ham_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int c5, f5, c11, f11;
  int i5 [4];
  int i11 [4];
  logic d5, d11;
  int c2, f2;
  int i2 [4];
  logic d2;

  fir_tb_harness #(.VARIANT(2), .N(N_TAPS5), .CH(1), .COEF(H_TAPS5), .SEED(11)) u_h5 (
    .clk, .rst_n, .checks(c5), .failures(f5), .n_isolated(i5[0]), .n_every(i5[1]),
    .n_chase(i5[2]), .n_pardata(i5[3]), .done(d5));

  fir_tb_harness #(.VARIANT(2), .N(N_TAPS11), .CH(4), .COEF(H_TAPS11), .SEED(23)) u_h11 (
    .clk, .rst_n, .checks(c11), .failures(f11), .n_isolated(i11[0]), .n_every(i11[1]),
    .n_chase(i11[2]), .n_pardata(i11[3]), .done(d11));

  fir_tb_harness #(.VARIANT(2), .N(N_TAPS5), .CH(2), .COEF(H_TAPS5), .SEED(37)) u_h2 (
    .clk, .rst_n, .checks(c2), .failures(f2), .n_isolated(i2[0]), .n_every(i2[1]),
    .n_chase(i2[2]), .n_pardata(i2[3]), .done(d2));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d5 === 1'b1 && d11 === 1'b1 && d2 === 1'b1);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c5 + c11 + c2, f5 + f11 + f2);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c5 + c11 + c2, f5 + f11 + f2 + 1);
    $finish;
  end

endmodule

// tb_hamming_corrector: checks hamming_corrector on random data, with the
// enable both low (data must pass unchanged) and high (the bit named by a
// one-hot error vector must be flipped back).
module tb_hamming_corrector;
  int checks = 0;
  int failures = 0;

  logic [7:0] din, ev, dout;
  logic       en;

  hamming_corrector #(.W(8)) dut (.data_in(din), .error_vector(ev), .enable(en),
                                  .data_corrected(dout));

  initial begin
    repeat (300) begin
      logic [7:0] good;
      int j;
      good = 8'($urandom);
      j = $urandom_range(7);
      ev = 8'(1) << j;
      din = good ^ ev;
      en = 1'b1;
      #1;
      checks++;
      if (dout !== good) failures++;
      en = 1'b0;
      #1;
      checks++;
      if (dout !== din) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

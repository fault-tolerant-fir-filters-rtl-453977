// tb_hamming_locator: exhaustive check of hamming_locator for 8 data bits.
// Each of the 16 syndromes must give a one-hot vector on the data bit at
// that codeword position, or all zeros for 0 and the parity positions
// 1, 2, 4 and 8.
module tb_hamming_locator;
  int checks = 0;
  int failures = 0;

  logic [3:0] syn;
  logic [7:0] ev;

  hamming_locator #(.W(8)) dut (.syndrome(syn), .error_vector(ev));

  // data positions of the 12-bit code, written out by hand
  localparam int POS [8] = '{3, 5, 6, 7, 9, 10, 11, 12};

  initial begin
    for (int s = 0; s < 16; s++) begin
      logic [7:0] exp_ev;
      exp_ev = '0;
      for (int j = 0; j < 8; j++) if (POS[j] == s) exp_ev[j] = 1'b1;
      syn = 4'(s);
      #1;
      checks++;
      if (ev !== exp_ev) begin
        failures++;
        $display("syndrome %0d: error vector %b expected %b", s, ev, exp_ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

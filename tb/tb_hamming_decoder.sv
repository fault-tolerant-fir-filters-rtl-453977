// tb_hamming_decoder: checks hamming_decoder for one and four channels.
// Random codewords from the reference code are given with no error and
// with every single data or parity bit flipped in turn; the decoder must
// return the original data and flag exactly the corrupted words.
module tb_hamming_decoder;
  `include "tb_ref_code.svh"

  int checks = 0;
  int failures = 0;

  logic [0:0][7:0] d1, c1;
  logic [3:0]      p1;
  logic            err1;
  logic [3:0][7:0] d4, c4;
  logic [5:0]      p4;
  logic            err4;

  hamming_decoder #(.W(8), .CH(1)) dut1 (.data(d1), .parity(p1), .data_corrected(c1),
                                         .error_detected(err1));
  hamming_decoder #(.W(8), .CH(4)) dut4 (.data(d4), .parity(p4), .data_corrected(c4),
                                         .error_detected(err4));

  initial begin
    repeat (60) begin
      logic [31:0] v;
      logic [63:0] pr1, pr4;
      v = $urandom;
      pr1 = ref_parity(128'(v[7:0]), 8, 1, 4);
      pr4 = ref_parity(128'(v), 8, 4, 4);
      // flip index -1: none; 0..W-1: data; above: parity
      for (int f = -1; f < 12; f++) begin
        d1 = v[7:0]; p1 = pr1[3:0];
        if (f >= 0 && f < 8) d1 = d1 ^ (8'(1) << f);
        if (f >= 8) p1 = p1 ^ (4'(1) << (f - 8));
        #1;
        checks++;
        if (c1 !== v[7:0] || err1 !== (f >= 0)) begin
          failures++;
          $display("CH1 flip %0d: out %h err %b expected %h", f, c1, err1, v[7:0]);
        end
      end
      for (int f = -1; f < 38; f++) begin
        d4 = v; p4 = pr4[5:0];
        if (f >= 0 && f < 32) d4 = d4 ^ (32'(1) << f);
        if (f >= 32) p4 = p4 ^ (6'(1) << (f - 32));
        #1;
        checks++;
        if (c4 !== v || err4 !== (f >= 0)) begin
          failures++;
          $display("CH4 flip %0d: out %h err %b expected %h", f, c4, err4, v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

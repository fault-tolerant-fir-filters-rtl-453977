// tb_hamming_syndrome: checks hamming_syndrome for one and four channels.
// A random codeword built with the reference code must give a zero
// syndrome and no enable; with one bit flipped (every data and parity bit
// in turn) the syndrome must equal that bit's column and only the
// flipped channel's enable may be set.
module tb_hamming_syndrome;
  `include "tb_ref_code.svh"

  int checks = 0;
  int failures = 0;

  logic [0:0][7:0] d1;
  logic [3:0]      p1, s1;
  logic [0:0]      e1;
  logic [3:0][7:0] d4;
  logic [5:0]      p4, s4;
  logic [3:0]      e4;

  hamming_syndrome #(.W(8), .CH(1)) dut1 (.data(d1), .parity(p1), .syndrome(s1), .enable(e1));
  hamming_syndrome #(.W(8), .CH(4)) dut4 (.data(d4), .parity(p4), .syndrome(s4), .enable(e4));

  task automatic expect4(input logic [5:0] es, input logic [3:0] ee);
    #1;
    checks++;
    if (s4 !== es || e4 !== ee) begin
      failures++;
      $display("CH4 syndrome %b enable %b expected %b %b", s4, e4, es, ee);
    end
  endtask

  task automatic expect1(input logic [3:0] es);
    #1;
    checks++;
    if (s1 !== es || e1 !== (es != 0)) begin
      failures++;
      $display("CH1 syndrome %b enable %b expected %b", s1, e1, es);
    end
  endtask

  initial begin
    repeat (40) begin
      logic [31:0] v;
      logic [63:0] pr1, pr4;
      v = $urandom;
      pr1 = ref_parity(128'(v[7:0]), 8, 1, 4);
      pr4 = ref_parity(128'(v), 8, 4, 4);
      d1 = v[7:0]; p1 = pr1[3:0];
      d4 = v;      p4 = pr4[5:0];
      expect1(4'd0);
      expect4(6'd0, 4'b0000);
      for (int j = 0; j < 8; j++) begin
        d1 = v[7:0] ^ (8'(1) << j);
        expect1(4'(ref_position(j)));
      end
      d1 = v[7:0];
      for (int i = 0; i < 4; i++) begin
        p1 = pr1[3:0] ^ (4'(1) << i);
        expect1(4'(1) << i);
      end
      for (int b = 0; b < 4; b++)
        for (int j = 0; j < 8; j++) begin
          d4 = v ^ (32'(1) << (b*8 + j));
          expect4(6'(b * 16 + ref_position(j)), 4'(1) << b);
        end
      d4 = v;
      for (int i = 0; i < 6; i++) begin
        p4 = pr4[5:0] ^ (6'(1) << i);
        // a parity flip enables the channel its high syndrome bits name;
        // the locator then finds no data bit to correct
        expect4(6'(1) << i, 4'(1) << (i < 4 ? 0 : i - 3));
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

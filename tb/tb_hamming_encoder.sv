// tb_hamming_encoder: checks hamming_encoder for one channel (8 data bits,
// 4 parity bits) and four channels coded as one word (32 data bits, 6
// parity bits) against the reference code, on the single-bit patterns and
// on random data.
module tb_hamming_encoder;
  `include "tb_ref_code.svh"

  int checks = 0;
  int failures = 0;

  logic [0:0][7:0] d1;
  logic [3:0]      p1;
  logic [3:0][7:0] d4;
  logic [5:0]      p4;

  hamming_encoder #(.W(8), .CH(1)) dut1 (.data(d1), .parity(p1));
  hamming_encoder #(.W(8), .CH(4)) dut4 (.data(d4), .parity(p4));

  task automatic check(input logic [31:0] v);
    logic [63:0] e1, e4;
    d1 = v[7:0];
    d4 = v;
    #1;
    e1 = ref_parity(128'(v[7:0]), 8, 1, 4);
    e4 = ref_parity(128'(v), 8, 4, 4);
    checks += 2;
    if (p1 !== e1[3:0]) begin
      failures++;
      $display("CH1 data %h parity %h expected %h", v[7:0], p1, e1[3:0]);
    end
    if (p4 !== e4[5:0]) begin
      failures++;
      $display("CH4 data %h parity %h expected %h", v, p4, e4[5:0]);
    end
  endtask

  initial begin
    // hand-worked value: data 0x01 sits at position 3 -> parity bits 1 and 2
    d1 = 8'h01;
    #1;
    checks++;
    if (p1 !== 4'b0011) failures++;
    for (int i = 0; i < 32; i++) check(32'(1) << i);
    repeat (500) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

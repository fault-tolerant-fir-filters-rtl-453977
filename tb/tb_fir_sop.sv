// tb_fir_sop: checks fir_sop with the 5-tap (six coefficient) and 11-tap
// (twelve coefficient) sets on random signed samples and on the extreme
// samples -128 and 127, against sums computed here with integers.
module tb_fir_sop;
  int checks = 0;
  int failures = 0;

  localparam int HA [6]  = '{-1, 24, 50, 50, 24, -1};
  localparam int HB [12] = '{1, -1, -9, 6, 73, 120, 120, 73, 6, -9, -1, 1};

  logic [5:0][7:0]  ta;
  logic [18:0]      ya;
  logic [11:0][7:0] tbv;
  logic [19:0]      yb;

  fir_sop #(.N(6), .W(8), .YW(19), .COEF(HA)) dut_a (.taps(ta), .y(ya));
  fir_sop #(.N(12), .W(8), .YW(20), .COEF(HB)) dut_b (.taps(tbv), .y(yb));

  task automatic run(input int mode);
    int sa, sb, s;
    sa = 0;
    sb = 0;
    for (int i = 0; i < 12; i++) begin
      case (mode)
        0: s = int'($urandom_range(255)) - 128;
        1: s = (HB[i] < 0) ? 127 : -128;
        default: s = (HB[i] < 0) ? -128 : 127;
      endcase
      tbv[i] = 8'(s);
      sb += s * HB[i];
      if (i < 6) begin
        ta[i] = 8'(s);
        sa += s * HA[i];
      end
    end
    #1;
    checks += 2;
    if ($signed(ya) != sa) begin
      failures++;
      $display("6 taps: %0d expected %0d", $signed(ya), sa);
    end
    if ($signed(yb) != sb) begin
      failures++;
      $display("12 taps: %0d expected %0d", $signed(yb), sb);
    end
  endtask

  initial begin
    run(1);
    run(2);
    repeat (500) run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

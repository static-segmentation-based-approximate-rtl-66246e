// tb_ssm_operand_mux: exhaustive check of the operand segment selector
// (N = 8, M = 4). For every operand value the expected segment is worked out
// arithmetically: values below 2^M pass unchanged, larger ones give
// x / 2^(N-M). The high flag must be set exactly for values of 2^M or more.
module tb_ssm_operand_mux;
  localparam int unsigned N = 8, M = 4;
  logic [N-1:0] x;
  logic [M-1:0] seg;
  logic hi;
  int checks = 0, failures = 0;

  ssm_operand_mux #(.N(N), .M(M)) dut (.x(x), .seg(seg), .hi(hi));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_seg;
    bit exp_hi;
    for (int i = 0; i < (1 << N); i++) begin
      x = N'(i);
      #1;
      exp_hi  = (i >= (1 << M));
      exp_seg = exp_hi ? i / (1 << (N - M)) : i;
      checks++;
      if (hi != exp_hi || int'(seg) != exp_seg) begin
        failures++;
        $display("FAIL x=%0d -> seg=%0d hi=%0d, expected %0d %0d", i, seg, hi, exp_seg, exp_hi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cpa: exhaustive check of the 8-bit carry-propagate adder.
// Every pair of 8-bit operands is applied with carry in 0 and 1, and
// {cout, sum} is compared with the integer a + b + cin. Carries that ripple
// through all eight cells (e.g. 255 + 1) are part of the sweep.
module tb_cpa;
  localparam int unsigned W = 8;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  cpa #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++)
      for (int j = 0; j < (1 << W); j++)
        for (int k = 0; k < 2; k++) begin
          a = W'(i); b = W'(j); cin = k[0];
          #1;
          checks++;
          if (int'({cout, sum}) != i + j + k) begin
            failures++;
            if (failures < 10) $display("FAIL %0d + %0d + %0d -> %0d", i, j, k, {cout, sum});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mult_mxm: exhaustive check of the 4 x 4 segment multiplier against the
// integer product.
module tb_mult_mxm;
  localparam int unsigned M = 4;
  logic [M-1:0] a, b;
  logic [2*M-1:0] p;
  int checks = 0, failures = 0;

  mult_mxm #(.M(M)) dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << M); i++)
      for (int j = 0; j < (1 << M); j++) begin
        a = M'(i); b = M'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("FAIL %0d * %0d -> %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

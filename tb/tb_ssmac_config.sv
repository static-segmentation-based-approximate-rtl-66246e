// tb_ssmac_config: random test of the static segmented MAC at segmentation
// settings other than the default 8/4/8, showing that the parameters N
// (operand width), M (segment width) and NC (addend width) can be traded
// against accuracy. Three instances run side by side on random operands:
//   N = 8,  M = 5, NC = 12   (M above N/2, addend wider than the product)
//   N = 16, M = 8, NC = 16   (the 2:1 segmentation at double width)
//   N = 12, M = 7, NC = 24   (addend wider than the whole segmented result)
// Each result is compared with a' * b' + c, where an operand of 2^M or more
// is rounded down to a multiple of 2^(N-M).
module tb_ssmac_config;
  import ssmac_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0]  a0, b0;  logic [11:0] c0; logic [18:0] y0; seg_sel_e s0;
  logic [15:0] a1, b1;  logic [15:0] c1; logic [32:0] y1; seg_sel_e s1;
  logic [11:0] a2, b2;  logic [23:0] c2; logic [34:0] y2; seg_sel_e s2;

  ssmac #(.N(8),  .M(5), .NC(12)) u0 (.a(a0), .b(b0), .c(c0), .y(y0), .sel(s0));
  ssmac #(.N(16), .M(8), .NC(16)) u1 (.a(a1), .b(b1), .c(c1), .y(y1), .sel(s1));
  ssmac #(.N(12), .M(7), .NC(24)) u2 (.a(a2), .b(b2), .c(c2), .y(y2), .sel(s2));

  function automatic longint approx_operand(longint x, int n, int m);
    return (x >= (longint'(1) << m)) ? (x >> (n - m)) << (n - m) : x;
  endfunction

  function automatic longint expect_y(longint a, longint b, longint c, int n, int m);
    return approx_operand(a, n, m) * approx_operand(b, n, m) + c;
  endfunction

  task automatic check(longint got, longint exp_y, string tag);
    checks++;
    if (got != exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", tag, got, exp_y);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100000; i++) begin
      // Small operands every fourth step, so the exact path is also taken.
      a0 = 8'($urandom);  b0 = 8'($urandom);  c0 = 12'($urandom);
      a1 = 16'($urandom); b1 = 16'($urandom); c1 = 16'($urandom);
      a2 = 12'($urandom); b2 = 12'($urandom); c2 = 24'($urandom);
      if (i % 4 == 0) begin a0 = a0 & 8'h1F; a1 = a1 & 16'h00FF; a2 = a2 & 12'h07F; end
      if (i % 8 == 0) begin b0 = b0 & 8'h1F; b1 = b1 & 16'h00FF; b2 = b2 & 12'h07F; end
      #1;
      check(longint'(y0), expect_y(a0, b0, c0, 8, 5), "8/5/12");
      check(longint'(y1), expect_y(a1, b1, c1, 16, 8), "16/8/16");
      check(longint'(y2), expect_y(a2, b2, c2, 12, 7), "12/7/24");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_c_segment: exhaustive check of the addend segmentation (N = 8, M = 4,
// NC = 8). For every C and every select code the expected segment is
// C / 2^(4 * s), with s the number of set bits of the select code.
module tb_c_segment;
  import ssmac_pkg::*;
  localparam int unsigned N = 8, M = 4, NC = 8;
  logic [NC-1:0] c, c_seg;
  seg_sel_e sel;
  int checks = 0, failures = 0;

  c_segment #(.N(N), .M(M), .NC(NC)) dut (.c(c), .sel(sel), .c_seg(c_seg));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, expv;
    for (int i = 0; i < (1 << NC); i++)
      for (int k = 0; k < 4; k++) begin
        c = NC'(i); sel = seg_sel_e'(k);
        #1;
        s = (k & 1) + (k >> 1);
        expv = i / (1 << ((N - M) * s));
        checks++;
        if (int'(c_seg) != expv) begin
          failures++;
          $display("FAIL c=%0d sel=%0d -> %0d, expected %0d", i, k, c_seg, expv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

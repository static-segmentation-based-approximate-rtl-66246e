// tb_ssmac_out_mux: check of the output re-alignment (N = 8, M = 4, NC = 8,
// 9-bit Y_mac). For every C, every select code and a set of Y_mac values
// (all-zero, all-one and random) the output must equal
// Y_mac * 2^(4 s) + (C mod 2^(4 s)), s being the number of set select bits.
module tb_ssmac_out_mux;
  import ssmac_pkg::*;
  localparam int unsigned N = 8, M = 4, NC = 8, WMAC = 9, WY = WMAC + 2 * (N - M);
  logic [WMAC-1:0] y_mac;
  logic [NC-1:0] c;
  seg_sel_e sel;
  logic [WY-1:0] y;
  int checks = 0, failures = 0;

  ssmac_out_mux #(.N(N), .M(M), .NC(NC), .WMAC(WMAC)) dut (.y_mac(y_mac), .c(c), .sel(sel), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, sh, ym;
    longint expv;
    for (int i = 0; i < (1 << NC); i++)
      for (int k = 0; k < 4; k++)
        for (int r = 0; r < 6; r++) begin
          ym = (r == 0) ? 0 : (r == 1) ? (1 << WMAC) - 1 : int'($urandom_range((1 << WMAC) - 1));
          y_mac = WMAC'(ym); c = NC'(i); sel = seg_sel_e'(k);
          #1;
          s  = (k & 1) + (k >> 1);
          sh = (N - M) * s;
          expv = longint'(ym) * (longint'(1) << sh) + longint'(i) % (longint'(1) << sh);
          checks++;
          if (longint'(y) != expv) begin
            failures++;
            if (failures < 10) $display("FAIL y_mac=%0d c=%0d sel=%0d -> %0d, expected %0d", ym, i, k, y, expv);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

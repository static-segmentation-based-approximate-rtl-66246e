// tb_ssmac: end-to-end test of the static segmented MAC at its default size
// (N = 8, M = 4, NC = 8, 17-bit result).
//
// 1. The three worked MAC examples of the error analysis (5*4+2, 3*6+1,
//    2*7+3). All operands fit in the low segment, so the result must be the
//    exact value.
// 2. Every pair of 8-bit operands a, b with six addends each (0, 255, 0xA5
//    and three random values). The reference is computed without the RTL's
//    structure: each operand of 16 or more is rounded down to a multiple of
//    16 (its high segment put back at its weight), then ref = a' * b' + c.
//    The result must also never exceed the exact a * b + c.
// 3. Mechanism counters: each of the four select codes, a carry out of the
//    8-bit adder, low addend bits appended by the output multiplexer. A
//    mechanism that never occurs counts as a failure.
// The run also reports the mean relative error distance (MRED) and the
// normalised mean error distance (NMED) of the sweep.
module tb_ssmac;
  import ssmac_pkg::*;
  localparam int unsigned N = 8, M = 4, NC = 8, WY = 17;
  logic [N-1:0]  a, b;
  logic [NC-1:0] c;
  logic [WY-1:0] y;
  seg_sel_e      sel;
  int checks = 0, failures = 0;
  int n_sel[4] = '{0, 0, 0, 0};
  int n_cout = 0, n_lowc = 0;

  ssmac dut (.a(a), .b(b), .c(c), .y(y), .sel(sel));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int approx_operand(int x);
    return (x >= (1 << M)) ? (x / (1 << (N - M))) * (1 << (N - M)) : x;
  endfunction

  task automatic apply(int ai, int bi, int ci, ref real red_sum, ref real ed_sum, ref int n);
    int ref_y, exact;
    a = N'(ai); b = N'(bi); c = NC'(ci);
    #1;
    exact = ai * bi + ci;
    ref_y = approx_operand(ai) * approx_operand(bi) + ci;
    checks++;
    if (int'(y) != ref_y || int'(y) > exact) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d+%0d -> %0d, expected %0d", ai, bi, ci, y, ref_y);
    end
    checks++;
    if (int'(sel) != ((int'(ai >= (1 << M)) << 1) | int'(bi >= (1 << M)))) begin
      failures++;
      if (failures < 10) $display("FAIL select code %0d for a=%0d b=%0d", sel, ai, bi);
    end
    n_sel[int'(sel)]++;
    // Y_mac, the adder's result, is y with the appended addend bits removed;
    // its bit 8 is the adder's carry out.
    if ((int'(y) >> ((N - M) * seg_steps(sel))) >= (1 << 8)) n_cout++;
    if (sel != SEG_LL && (ci % (1 << (N - M))) != 0) n_lowc++;
    if (exact != 0) red_sum += real'(exact - int'(y)) / real'(exact);
    ed_sum += real'(exact - int'(y));
    n++;
  endtask

  initial begin
    automatic real red_sum = 0.0, ed_sum = 0.0, dummy_r = 0.0, dummy_e = 0.0;
    automatic int n = 0, dummy_n = 0;
    int cset[6];
    automatic int t2[3][4] = '{'{5, 4, 2, 22}, '{3, 6, 1, 19}, '{2, 7, 3, 17}};

    foreach (t2[i]) begin
      apply(t2[i][0], t2[i][1], t2[i][2], dummy_r, dummy_e, dummy_n);
      checks++;
      if (int'(y) != t2[i][3]) begin
        failures++;
        $display("FAIL example %0d*%0d+%0d -> %0d, expected %0d", t2[i][0], t2[i][1], t2[i][2], y, t2[i][3]);
      end
    end

    for (int i = 0; i < (1 << N); i++)
      for (int j = 0; j < (1 << N); j++) begin
        cset = '{0, 255, 'hA5, int'($urandom_range(255)), int'($urandom_range(255)), int'($urandom_range(255))};
        foreach (cset[k]) apply(i, j, cset[k], red_sum, ed_sum, n);
      end

    foreach (n_sel[k]) begin
      checks++;
      if (n_sel[k] == 0) begin failures++; $display("FAIL select code %0d never occurred", k); end
    end
    checks++;
    if (n_cout == 0) begin failures++; $display("FAIL adder carry out never occurred"); end
    checks++;
    if (n_lowc == 0) begin failures++; $display("FAIL low addend bits never appended"); end

    $display("select codes 00/01/10/11: %0d %0d %0d %0d, carry out: %0d, low addend bits appended: %0d",
             n_sel[0], n_sel[1], n_sel[2], n_sel[3], n_cout, n_lowc);
    $display("MRED = %f  NMED = %f over %0d operations", red_sum / real'(n),
             (ed_sum / real'(n)) / real'(255 * 255 + 255), n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dbf_md: self-checking test of the mode decision.
// Segments from the reference generator are fed as the ISR presents them:
// start in T1 with v1 on the input and v0 in P9, then one pixel per cycle
// up to v9 in T9. In T11 dec_valid must be high (and low in every other
// cycle), smooth must equal F(v) >= 6, range_ok must equal
// max(v1..v8) - min(v1..v8) < 2 QP, and the mode, combined with a random
// DF condition, must match the decision rule. The segment kinds are mixed
// so that all three modes occur.
module tb_dbf_md;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0, df_on = 1'b0;
  pix_t  cur_pix = '0, prev_pix = '0;
  qp_t   qp = '0;
  logic  smooth, range_ok, dec_valid;
  mode_e mode;

  dbf_md dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_mode [3] = '{0, 0, 0};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 1000; s++) begin
      seg_t v;
      int q, exp_mode;
      bit exp_smooth, exp_range, dfc;
      v = gen(s % 5);
      q = $urandom_range(1, 31);
      dfc = $urandom_range(0, 1) == 1;
      exp_smooth = flat_count(v) >= 6;
      exp_range  = range18(v) < 2*q;
      exp_mode   = exp_smooth ? (exp_range ? MODE_SMOOTH : MODE_NONE)
                              : (dfc ? MODE_DEFAULT : MODE_NONE);
      n_mode[exp_mode]++;
      qp = qp_t'(q);
      // T1 .. T10
      for (int t = 1; t <= 10; t++) begin
        start    = (t == 1);
        cur_pix  = (t <= 9) ? pix_t'(v[t]) : pix_t'($urandom);
        prev_pix = pix_t'(v[t-1]);
        @(negedge clk);
        if (t <= 9) check(!dec_valid, "dec_valid early");
      end
      // T11
      df_on = dfc;
      cur_pix = pix_t'($urandom); prev_pix = pix_t'($urandom);
      check(dec_valid, "dec_valid missing in T11");
      check(smooth == exp_smooth, $sformatf("seg %0d: smooth %0b, expected %0b", s, smooth, exp_smooth));
      check(range_ok == exp_range, $sformatf("seg %0d: range_ok %0b, expected %0b", s, range_ok, exp_range));
      #1 check(int'(mode) == exp_mode, $sformatf("seg %0d: mode %0d, expected %0d", s, mode, exp_mode));
      repeat ($urandom_range(1, 3)) begin
        @(negedge clk);
        check(!dec_valid, "dec_valid late");
        check(int'(mode) == exp_mode, "mode not held");
      end
    end
    for (int m = 0; m < 3; m++) check(n_mode[m] > 0, "a mode never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_dbf_df: self-checking test of the default-mode filter.
// A small model of the ISR presents each segment to the DF taps exactly as
// in the full design: in cycle T_k the input carries v_k, P9 v_k-1, P8 v_k-2,
// P7 v_k-3, P5 v_k-5 and P4 v_k-6; start is high in T4. The result must be
// valid in T11 (res_valid high there and nowhere else) with df_on equal to
// |a1| < QP and v4', v5' equal to v4 - d', v5 + d' from the reference model.
// Rough segments with a boundary step make d' non-zero and often clipped.
module tb_dbf_df;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  pix_t d0 = '0, d1 = '0, d2 = '0, d3 = '0, v4 = '0, v5 = '0;
  qp_t  qp = '0;
  pix_t v4_out, v5_out;
  logic df_on, res_valid;

  dbf_df dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_on = 0, n_off = 0, n_nonzero = 0, n_clip = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic pix_t at(seg_t v, int i);
    return (i >= 0 && i <= 9) ? pix_t'(v[i]) : pix_t'($urandom);
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 2000; s++) begin
      seg_t v;
      int q, d;
      bit on;
      v = gen((s % 3 == 0) ? 0 : 2);
      q = $urandom_range(1, 31);
      on = iabs(acoef(v, 1)) < 8*q;
      d = df_delta(v);
      if (on) n_on++; else n_off++;
      if (d != 0) n_nonzero++;
      if (d != 0 && d == (v[4] - v[5]) / 2) n_clip++;
      qp = qp_t'(q);
      for (int t = 0; t <= 10; t++) begin
        start = (t == 4);
        d3 = at(v, t); d2 = at(v, t - 1); d1 = at(v, t - 2); d0 = at(v, t - 3);
        v5 = at(v, t - 5); v4 = at(v, t - 6);
        @(negedge clk);
        if (t <= 9) check(!res_valid, "res_valid before T11");
      end
      d0 = pix_t'($urandom); d1 = pix_t'($urandom); d2 = pix_t'($urandom); d3 = pix_t'($urandom);
      check(res_valid, "res_valid missing in T11");
      check(df_on == on, $sformatf("seg %0d: df_on %0b, expected %0b", s, df_on, on));
      check(int'(v4_out) == v[4] - d, $sformatf("seg %0d: v4' %0d, expected %0d", s, v4_out, v[4] - d));
      check(int'(v5_out) == v[5] + d, $sformatf("seg %0d: v5' %0d, expected %0d", s, v5_out, v[5] + d));
      @(negedge clk);
      check(!res_valid, "res_valid after T11");
    end
    check(n_on > 0 && n_off > 0 && n_nonzero > 0 && n_clip > 0, "a case never occurred");
    $display("df_on %0d / off %0d, nonzero d' %0d, clipped %0d", n_on, n_off, n_nonzero, n_clip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_dbf_ctrl: self-checking test of the segment scheduler.
// Segments are started back to back or after idle gaps; the mode input is
// random except in T11, where it carries the segment's mode. In every cycle
// each control output is compared with the published schedule written out
// as a table per cycle number: MD start T1, DF start T4, CP start T5 and T9,
// pad_lo T6, pad_hi T10..T13, OSR load T11 (not in smooth mode), OSR shift
// T8..T10 then T11..T22 in smooth mode or T12..T18 otherwise, output
// T16..T23 in smooth mode or T12..T19 otherwise, and ready in the last
// output cycle (19 or 23 cycles per segment).
module tb_dbf_ctrl;
  import dbf_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  mode_e mode = MODE_NONE;
  logic  ready, isr_en, qp_load, md_start, df_start, cp_start, cp_sel_hi;
  logic  pad_lo, pad_hi, osr_shift, osr_load, osr_df_en, out_valid;
  mode_e seg_mode;

  dbf_ctrl dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_b2b = 0;
  int n_mode [3] = '{0, 0, 0};

  task automatic check(bit got, bit want, string what, int t);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL: %s = %0b in T%0d, expected %0b", what, got, t, want);
    end
  endtask

  initial begin
    int t, m, last;
    bit sm;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int s = 0; s < 600; s++) begin
      m = $urandom_range(0, 2);
      n_mode[m]++;
      sm = (m == 2);
      last = sm ? 23 : 19;
      // T0
      check(ready, 1'b1, "ready", 0);
      start = 1'b1;
      mode = mode_e'($urandom_range(0, 2));
      #1 check(qp_load, 1'b1, "qp_load", 0);
      check(isr_en, 1'b1, "isr_en", 0);
      for (t = 1; t <= last; t++) begin
        @(negedge clk);
        mode = (t == 11) ? mode_e'(m) : mode_e'($urandom_range(0, 2));
        start = 1'b0;
        #1;
        check(md_start, t == 1, "md_start", t);
        check(df_start, t == 4, "df_start", t);
        check(cp_start, t == 5 || t == 9, "cp_start", t);
        if (t == 5 || t == 9) check(cp_sel_hi, t == 9, "cp_sel_hi", t);
        check(pad_lo, t == 6, "pad_lo", t);
        check(pad_hi, t >= 10 && t <= 13, "pad_hi", t);
        check(osr_load, t == 11 && !sm, "osr_load", t);
        if (t != 11 || sm)
          check(osr_shift, (t >= 8 && t <= 10) || (sm && t >= 11 && t <= 22) ||
                           (!sm && t >= 12 && t <= 18), "osr_shift", t);
        check(out_valid, sm ? (t >= 16 && t <= 23) : (t >= 12 && t <= 19), "out_valid", t);
        check(ready, t == last, "ready", t);
        if (t >= 11) begin
          checks++;
          if (seg_mode != mode_e'(m)) failures++;
          check(osr_df_en, m == 1, "osr_df_en", t);
        end
      end
      // either start the next segment in the last output cycle or idle
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        repeat ($urandom_range(0, 3)) begin
          #1 check(ready, 1'b1, "ready idle", 0);
          check(out_valid, 1'b0, "out_valid idle", 0);
          @(negedge clk);
        end
      end else n_b2b++;
    end
    checks++;
    if (n_b2b == 0 || n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0) failures++;
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

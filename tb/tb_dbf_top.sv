// tb_dbf_top: end-to-end test of the deblocking filter at its default size.
//
// Streams random segments of several kinds (nearly flat, rough, flat with a
// big step, fully random) through dbf_top, some back to back and some with
// idle gaps, and compares every output pixel, the reported mode and the
// output cycles (v1' in T12 and v8' in T19 for default / no filtering, T16
// and T23 for smooth mode) with the reference model. It counts how often each
// mechanism of the design was exercised and fails if one never was: each of
// the three modes, no filtering reached through either branch, both padding
// choices at both ends, a clipped default-mode correction, and a segment
// started in the last output cycle of the previous one.
module tb_dbf_top;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  localparam int NSEG = 2000;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic  ready, out_valid;
  pix_t  in_pix = '0, out_pix;
  qp_t   qp = '0;
  mode_e out_mode;

  dbf_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  // expected results, one entry per segment
  typedef struct { out_t o; int mode; longint t0; } exp_t;
  exp_t expq [$];

  // mechanism counters
  int n_mode [3] = '{0, 0, 0};
  int n_none_smooth_branch = 0, n_none_default_branch = 0;
  int n_pad_lo_end = 0, n_pad_lo_nb = 0, n_pad_hi_end = 0, n_pad_hi_nb = 0;
  int n_clip = 0, n_back_to_back = 0, n_gap = 0, n_segs_done = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // Driver
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSEG; s++) begin
      seg_t v;
      exp_t e;
      int q, dd, kind;
      kind = s % 5;
      v = gen(kind);
      q = $urandom_range(1, 31);
      e.mode = filter(v, q, e.o, dd);
      n_mode[e.mode]++;
      if (e.mode == MODE_NONE) begin
        if (flat_count(v) >= 6) n_none_smooth_branch++;
        else                    n_none_default_branch++;
      end
      if (e.mode == MODE_SMOOTH) begin
        if (pad_lo(v, q) == v[0] && v[0] != v[1]) n_pad_lo_end++;
        if (pad_lo(v, q) == v[1] && v[0] != v[1]) n_pad_lo_nb++;
        if (pad_hi(v, q) == v[9] && v[9] != v[8]) n_pad_hi_end++;
        if (pad_hi(v, q) == v[8] && v[9] != v[8]) n_pad_hi_nb++;
      end
      if (e.mode == MODE_DEFAULT && dd != 0 && (dd == (v[4] - v[5]) / 2)) n_clip++;
      while (!ready) @(negedge clk);
      if ($urandom_range(0, 7) == 0) begin
        repeat ($urandom_range(1, 3)) @(negedge clk);
        n_gap++;
      end
      if (out_valid) n_back_to_back++;
      start = 1'b1; in_pix = pix_t'(v[0]); qp = qp_t'(q);
      e.t0 = cyc;
      expq.push_back(e);
      for (int i = 1; i < 10; i++) begin
        @(negedge clk);
        start = 1'b0; in_pix = pix_t'(v[i]); qp = qp_t'($urandom);
      end
      @(negedge clk);
      in_pix = pix_t'($urandom);
    end
  end

  // Monitor
  int oidx = 0;
  always @(negedge clk) if (rst_n && out_valid) begin
    if (expq.size() == 0) begin
      check(1'b0, "output without a segment");
    end else begin
      exp_t e;
      int first;
      e = expq[0];
      first = (e.mode == MODE_SMOOTH) ? 16 : 12;
      check(out_pix == pix_t'(e.o[oidx]),
            $sformatf("pixel v%0d' = %0d, expected %0d", oidx + 1, out_pix, e.o[oidx]));
      check(int'(out_mode) == e.mode, $sformatf("mode %0d, expected %0d", out_mode, e.mode));
      check(cyc - e.t0 == longint'(first + oidx),
            $sformatf("v%0d' in T%0d, expected T%0d", oidx + 1, cyc - e.t0, first + oidx));
      oidx++;
      if (oidx == 8) begin
        oidx = 0;
        void'(expq.pop_front());
        n_segs_done++;
      end
    end
  end

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: never exercised: %s", what);
    end
  endtask

  initial begin
    wait (n_segs_done == NSEG);
    repeat (5) @(posedge clk);
    check(expq.size() == 0, "segments left without output");
    $display("modes: none %0d (smooth branch %0d, default branch %0d), default %0d, smooth %0d",
             n_mode[0], n_none_smooth_branch, n_none_default_branch, n_mode[1], n_mode[2]);
    $display("padding v0/v1 %0d/%0d, v9/v8 %0d/%0d, clipped %0d, back-to-back %0d, gaps %0d",
             n_pad_lo_end, n_pad_lo_nb, n_pad_hi_end, n_pad_hi_nb, n_clip, n_back_to_back, n_gap);
    need(n_mode[MODE_SMOOTH], "smooth mode");
    need(n_mode[MODE_DEFAULT], "default mode");
    need(n_none_smooth_branch, "no filtering after the smooth-mode test");
    need(n_none_default_branch, "no filtering after the default-mode test");
    need(n_pad_lo_end, "padding with v0");
    need(n_pad_lo_nb, "padding with v1");
    need(n_pad_hi_end, "padding with v9");
    need(n_pad_hi_nb, "padding with v8");
    need(n_clip, "clipped default-mode correction");
    need(n_back_to_back, "segment started in the last output cycle");
    need(n_gap, "idle gap between segments");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSEG * 40 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

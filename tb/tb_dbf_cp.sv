// tb_dbf_cp: self-checking test of the padding generator.
// Random end/neighbour pixel pairs and QP values are applied with start; the
// padding pixel must be the end pixel when |end - neighbour| < QP and the
// neighbour otherwise, one cycle after start (the second of the two cycles),
// and must hold while start stays low. Pairs are drawn close together half
// of the time so that both choices occur often.
module tb_dbf_cp;
  import dbf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  pix_t end_pix = '0, nb_pix = '0, pad_pix;
  qp_t  qp = '0;

  dbf_cp dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_end = 0, n_nb = 0;
  int expv = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      int e, n, q, idle;
      e = $urandom_range(0, 255);
      n = ($urandom_range(0, 1) == 1) ? $urandom_range(0, 255)
                                      : ((e + $urandom_range(0, 40) - 20) & 255);
      q = $urandom_range(1, 31);
      start = 1'b1; end_pix = pix_t'(e); nb_pix = pix_t'(n); qp = qp_t'(q);
      expv = ((e > n ? e - n : n - e) < q) ? e : n;
      if (expv == e && e != n) n_end++;
      if (expv == n && e != n) n_nb++;
      @(negedge clk);
      start = 1'b0; end_pix = pix_t'($urandom); nb_pix = pix_t'($urandom); qp = qp_t'($urandom);
      idle = $urandom_range(1, 3);
      for (int k = 0; k < idle; k++) begin
        checks++;
        if (int'(pad_pix) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL: end %0d nb %0d qp %0d -> %0d, expected %0d", e, n, q, pad_pix, expv);
        end
        if (k < idle - 1) @(negedge clk);
      end
    end
    checks++;
    if (n_end == 0 || n_nb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

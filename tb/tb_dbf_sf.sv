// tb_dbf_sf: self-checking test of the smooth-mode nine-tap filter.
// A random nine-pixel window is applied every cycle (sometimes all 255 or all
// 0 to reach the extremes); one cycle later the output must equal
// (P0 + P1 + 2 P2 + 2 P3 + 4 P4 + 2 P5 + 2 P6 + P7 + P8 + 8) / 16.
module tb_dbf_sf;
  import dbf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  pix_t p [9];
  pix_t px_out;

  dbf_sf dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int b [9] = '{1, 1, 2, 2, 4, 2, 2, 1, 1};

  initial begin
    int expv;
    for (int i = 0; i < 9; i++) p[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    expv = -1;
    for (int c = 0; c < 3000; c++) begin
      int s, kind;
      if (expv >= 0) begin
        checks++;
        if (int'(px_out) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: %0d, expected %0d", c, px_out, expv);
        end
      end
      kind = $urandom_range(0, 9);
      s = 0;
      for (int i = 0; i < 9; i++) begin
        p[i] = (kind == 0) ? 8'hff : (kind == 1) ? 8'h00 : pix_t'($urandom);
        s += b[i] * int'(p[i]);
      end
      expv = (s + 8) / 16;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

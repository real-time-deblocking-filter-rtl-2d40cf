// tb_dbf_isr: self-checking test of the input shift register.
// Random pixels enter every cycle; enable, the two padding loads and the
// padding pixel are random. A model that tracks where every pixel must be
// (P9 gets the input, pixels move towards P0, pad_lo overwrites P3..P0,
// pad_hi overwrites P8, nothing moves when disabled) is compared with all ten
// registers after every clock.
module tb_dbf_isr;
  import dbf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, pad_lo = 1'b0, pad_hi = 1'b0;
  pix_t in_pix = '0, pad_pix = '0;
  pix_t p [10];

  dbf_isr dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int model [10];

  initial begin
    for (int i = 0; i < 10; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int i = 0; i < 10; i++) begin
        checks++;
        if (int'(p[i]) != model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: P%0d = %0d, expected %0d", c, i, p[i], model[i]);
        end
      end
      en      = $urandom_range(0, 7) != 0;
      pad_lo  = $urandom_range(0, 5) == 0;
      pad_hi  = $urandom_range(0, 5) == 0;
      in_pix  = pix_t'($urandom);
      pad_pix = pix_t'($urandom);
      // next state of the model
      if (en) begin
        int nxt [10];
        nxt[9] = in_pix;
        for (int i = 0; i < 9; i++) nxt[i] = model[i+1];
        if (pad_hi) nxt[8] = pad_pix;
        if (pad_lo) for (int i = 0; i <= 3; i++) nxt[i] = pad_pix;
        model = nxt;
      end
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

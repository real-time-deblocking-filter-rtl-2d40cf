// tb_dbf_osr: self-checking test of the output shift register.
// Random mixes of shift, parallel load and load with DF replacement are
// applied. A model keeps the pixels in output order (entry 0 leaves first):
// a shift drops entry 0 and appends the SF pixel, a load puts v1..v8 in
// order with v4 and v5 replaced by the DF pixels when df_en is set. Every
// cycle the output must equal entry 0, and after each load the eight
// following shifts must deliver v1..v8 in order.
module tb_dbf_osr;
  import dbf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, shift = 1'b0, load = 1'b0, df_en = 1'b0;
  pix_t sf_in = '0, df_v4 = '0, df_v5 = '0, out_pix;
  pix_t isr_pix [8];

  dbf_osr dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int model [8];

  initial begin
    for (int i = 0; i < 8; i++) begin model[i] = 0; isr_pix[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      checks++;
      if (int'(out_pix) != model[0]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: out %0d, expected %0d", c, out_pix, model[0]);
      end
      shift = $urandom_range(0, 3) != 0;
      load  = $urandom_range(0, 9) == 0;
      df_en = $urandom_range(0, 1) == 1;
      sf_in = pix_t'($urandom); df_v4 = pix_t'($urandom); df_v5 = pix_t'($urandom);
      for (int i = 0; i < 8; i++) isr_pix[i] = pix_t'($urandom);
      if (load) begin
        for (int i = 0; i < 8; i++) model[i] = isr_pix[i];
        if (df_en) begin model[3] = df_v4; model[4] = df_v5; end
      end else if (shift) begin
        for (int i = 0; i < 7; i++) model[i] = model[i+1];
        model[7] = sf_in;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

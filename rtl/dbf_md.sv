// dbf_md: mode decision (MD) of the deblocking filter.
//
// The segment v0..v9 arrives one pixel per cycle. From the cycle start is
// high (T1 of the schedule, when cur_pix = v1 and prev_pix = v0) MD takes
// the difference of each pair of neighbouring pixels and a counter adds one
// for every |v_i - v_i+1| <= THR1; after nine pairs the counter holds
// F(v). Over the same cycles it tracks the largest and the smallest of
// v1..v8. In the tenth cycle (T10) it registers
//   smooth   = F(v) >= THR2                 (smooth mode selected)
//   range_ok = max(v1..v8) - min(v1..v8) < 2*QP  (smooth filter applies)
// and from T11 on it reports the mode: smooth mode if smooth and range_ok,
// no filtering if smooth and not range_ok, and otherwise default mode if
// the DF block reports |a1| < QP (df_on), else no filtering. dec_valid is high
// in T11. Outputs hold until the next start.
// The counter and the decision time follow the published architecture; the
// running max/min and the way the DF condition is combined here are this
// design's own.
module dbf_md
  import dbf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,     // T1: cur_pix = v1, prev_pix = v0
  input  pix_t  cur_pix,   // pixel on the ISR input
  input  pix_t  prev_pix,  // pixel in P9
  input  qp_t   qp,
  input  logic  df_on,     // |a1| < QP, from DF, valid from T11
  output logic  smooth,    // F(v) >= THR2
  output logic  range_ok,  // max - min < 2QP
  output mode_e mode,      // decision, valid from T11
  output logic  dec_valid  // high in T11
);

  logic [3:0]  phase;      // 0..9 while running (T1..T10)
  logic        run;
  logic [3:0]  cnt;        // F(v)
  pix_t        vmax, vmin;
  pix_t        diff;
  logic        flat;

  always_comb begin
    diff = (cur_pix > prev_pix) ? cur_pix - prev_pix : prev_pix - cur_pix;
    flat = diff <= PIX_W'(THR1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; phase <= '0; cnt <= '0;
      vmax <= '0; vmin <= '0;
      smooth <= 1'b0; range_ok <= 1'b0; dec_valid <= 1'b0;
    end else begin
      dec_valid <= 1'b0;
      if (start) begin
        run   <= 1'b1;
        phase <= 4'd1;
        cnt   <= {3'b0, flat};
        vmax  <= cur_pix;
        vmin  <= cur_pix;
      end else if (run) begin
        phase <= phase + 4'd1;
        if (phase <= 4'd8) cnt <= cnt + {3'b0, flat};
        if (phase <= 4'd7) begin
          if (cur_pix > vmax) vmax <= cur_pix;
          if (cur_pix < vmin) vmin <= cur_pix;
        end
        if (phase == 4'd9) begin
          run       <= 1'b0;
          smooth    <= cnt >= 4'(THR2);
          range_ok  <= (vmax - vmin) < {2'b0, qp, 1'b0};
          dec_valid <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    if (smooth) mode = range_ok ? MODE_SMOOTH : MODE_NONE;
    else        mode = df_on ? MODE_DEFAULT : MODE_NONE;
  end

endmodule

// dbf_df: default-mode filter (DF) of the deblocking filter.
//
// The default mode corrects only the two pixels next to the block boundary:
//   a_k  = (2 v_2k+1 - 5 v_2k+2 + 5 v_2k+3 - 2 v_2k+4) / 8,   k = 0, 1, 2
//   a1'  = sign(a1) * min(|a0|, |a1|, |a2|)
//   d    = 5/8 * (a1' - a1)
//   d'   = Clip(d, 0, (v4 - v5)/2)   (clip to the interval between 0 and the bound)
//   v4'  = v4 - d',   v5' = v5 + d'
// and it applies only when |a1| < QP (df_on).
//
// The coefficients are kept as exact integers A_k = 8*a_k, so the test
// |a1| < QP becomes |A1| < 8*QP and d = 5*(A1' - A1)/64. Every product is a
// shift and an add. Divisions truncate towards zero: d = sign * (5*|A1'-A1| >> 6)
// and (v4 - v5)/2 = sign * (|v4 - v5| >> 1).
//
// Timing (cycle numbers of the segment schedule, start high in T4):
//   T4/T5  A0 from v1..v4     (stage 1: two 9-bit differences, stage 2: shift-and-add)
//   T6/T7  A1 from v3..v6
//   T8/T9  A2 from v5..v8
//   T10    min, d, clip and v4', v5' from P4 = v4 and P5 = v5; registered
//   T11    v4_out, v5_out, df_on valid (res_valid high), held until next start
// Taps d0..d3 carry v_2k+1..v_2k+4 in the first cycle of each pair: the ISR
// input, P9, P8 and P7. The formulas and the cycle plan follow the published
// algorithm and schedule; the integer scaling and the truncation are this
// design's own.
module dbf_df
  import dbf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,      // T4
  input  pix_t d0,         // v_2k+1 (P7)
  input  pix_t d1,         // v_2k+2 (P8)
  input  pix_t d2,         // v_2k+3 (P9)
  input  pix_t d3,         // v_2k+4 (ISR input)
  input  pix_t v4,         // P4, read in T10
  input  pix_t v5,         // P5, read in T10
  input  qp_t  qp,
  output pix_t v4_out,
  output pix_t v5_out,
  output logic df_on,      // |a1| < QP
  output logic res_valid   // high in T11
);

  typedef logic signed [8:0]  diff_t;   // difference of two pixels
  typedef logic signed [11:0] coef_t;   // A_k = 8 a_k, |A_k| <= 1785

  logic [2:0]  phase;
  logic        run;
  diff_t       sa, sb;                  // stage-1 registers
  coef_t       a [3];

  // Stage 1: 9-bit differences.
  diff_t sa_n, sb_n;
  always_comb begin
    sa_n = diff_t'({1'b0, d0}) - diff_t'({1'b0, d3});
    sb_n = diff_t'({1'b0, d2}) - diff_t'({1'b0, d1});
  end

  // Stage 2: A = 2*sa + 5*sb by shifts and adds.
  coef_t coef_n;
  always_comb coef_n = (coef_t'(sa) <<< 1) + (coef_t'(sb) <<< 2) + coef_t'(sb);

  // Final stage.
  logic [10:0] m0, m1, m2, mn, dmag_full;
  logic [13:0] five;
  logic [7:0]  dmag, hmag, dclip;
  logic signed [8:0] hd;
  logic        d_neg, h_neg;
  pix_t        v4_n, v5_n;

  function automatic logic [10:0] absval(coef_t x);
    return x[11] ? 11'(-x) : 11'(x);
  endfunction

  always_comb begin
    m0 = absval(a[0]);
    m1 = absval(a[1]);
    m2 = absval(a[2]);
    mn = m1;
    if (m0 < mn) mn = m0;
    if (m2 < mn) mn = m2;
    dmag_full = m1 - mn;                       // |A1' - A1|
    five      = {dmag_full, 2'b00} + 14'(dmag_full);
    dmag      = 8'(five >> 6);                 // |d|, at most 139
    d_neg     = !a[1][11];                     // d has the sign opposite to a1
    hd        = $signed({1'b0, v4}) - $signed({1'b0, v5});
    h_neg     = hd[8];
    hmag      = h_neg ? 8'((-hd) >>> 1) : 8'(hd >>> 1);
    // Clip d into the interval between 0 and h: zero if the signs differ,
    // otherwise the smaller magnitude.
    if (dmag == 8'd0 || d_neg != h_neg) dclip = 8'd0;
    else                                dclip = (dmag < hmag) ? dmag : hmag;
    if (h_neg) begin          // d' <= 0: v4 grows, v5 shrinks
      v4_n = v4 + dclip;
      v5_n = v5 - dclip;
    end else begin
      v4_n = v4 - dclip;
      v5_n = v5 + dclip;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; phase <= '0; sa <= '0; sb <= '0;
      for (int k = 0; k < 3; k++) a[k] <= '0;
      v4_out <= '0; v5_out <= '0; df_on <= 1'b0; res_valid <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      if (start || run) begin
        run   <= 1'b1;
        phase <= start ? 3'd1 : phase + 3'd1;
        if (start || !phase[0]) begin          // phases 0, 2, 4
          sa <= sa_n;
          sb <= sb_n;
        end
        if (!start && phase[0] && phase <= 3'd5) a[phase[2:1]] <= coef_n;  // 1, 3, 5
        if (!start && phase == 3'd6) begin
          run       <= 1'b0;
          v4_out    <= v4_n;
          v5_out    <= v5_n;
          df_on     <= m1 < {3'b0, qp, 3'b000};
          res_valid <= 1'b1;
        end
      end
    end
  end

endmodule

// dbf_ctrl: segment scheduler of the deblocking filter.
//
// A cycle counter t follows one segment through the fixed schedule. The cycle
// in which start is accepted is T0 (v0 on the pixel input); t then counts
// 1, 2, ... and every block is started at its cycle:
//   T1      MD starts (v1 on the input, v0 in P9)
//   T4      DF starts
//   T5, T9  CP reads (P5, P6) = (v0, v1), then (input, P9) = (v9, v8)
//   T6      ISR loads the v0 padding into P3..P0
//   T10-13  ISR loads the v9 padding into P8
//   T8-T10  OSR shifts SF results in (the mode is not known yet)
//   T11     mode decided: smooth mode keeps shifting SF results in until
//           T15 and shifts v1'..v8' out in T16..T23; default and no-filter
//           modes load the OSR from the ISR (and DF) and shift out in T12..T19.
// ready is high when idle and in the last output cycle, so back-to-back
// segments take 19 cycles (default / no filtering) or 23 cycles (smooth).
// The cycle numbers follow the published schedule; the start/ready handshake
// and the back-to-back overlap of one cycle are this design's own.
module dbf_ctrl
  import dbf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,       // v0 on the pixel input this cycle
  input  mode_e mode,        // from MD, valid in T11
  output logic  ready,       // start is accepted this cycle
  output logic  isr_en,
  output logic  qp_load,
  output logic  md_start,
  output logic  df_start,
  output logic  cp_start,
  output logic  cp_sel_hi,   // CP operands: 0 = (P5, P6), 1 = (input, P9)
  output logic  pad_lo,
  output logic  pad_hi,
  output logic  osr_shift,
  output logic  osr_load,
  output logic  osr_df_en,
  output logic  out_valid,
  output mode_e seg_mode     // mode of the segment being output (from T11)
);

  logic       busy;
  logic [4:0] t;
  mode_e      mode_q;
  logic       sm, last, go;

  always_comb begin
    seg_mode = (t == 5'(T_DEC)) ? mode : mode_q;
    sm       = seg_mode == MODE_SMOOTH;
    last     = busy && (t == (sm ? 5'(T_END_SM) : 5'(T_END_DEF)));
    ready    = !busy || last;
    go       = start && ready;

    isr_en    = busy || start;
    qp_load   = go;
    md_start  = busy && t == 5'(T_MD);
    df_start  = busy && t == 5'(T_DF);
    cp_start  = busy && (t == 5'(T_CP_LO) || t == 5'(T_CP_HI));
    cp_sel_hi = t == 5'(T_CP_HI);
    pad_lo    = busy && t == 5'(T_CP_LO + 1);
    pad_hi    = busy && t >= 5'(T_CP_HI + 1) && t <= 5'(T_CP_HI + 4);
    osr_load  = busy && t == 5'(T_DEC) && !sm;
    osr_df_en = seg_mode == MODE_DEFAULT;
    if (!busy || t < 5'(T_SF + 1))  osr_shift = 1'b0;
    else if (t < 5'(T_DEC))          osr_shift = 1'b1;
    else if (sm)                     osr_shift = t < 5'(T_END_SM);
    else                             osr_shift = t > 5'(T_DEC) && t < 5'(T_END_DEF);
    if (!busy)  out_valid = 1'b0;
    else if (sm) out_valid = t >= 5'(T_END_SM - 7) && t <= 5'(T_END_SM);
    else         out_valid = t >= 5'(T_DEC + 1) && t <= 5'(T_END_DEF);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; t <= '0; mode_q <= MODE_NONE;
    end else begin
      if (t == 5'(T_DEC)) mode_q <= mode;
      if (go) begin
        busy <= 1'b1;
        t    <= 5'd1;
      end else if (last) begin
        busy <= 1'b0;
        t    <= '0;
      end else if (busy) begin
        t <= t + 5'd1;
      end
    end
  end

endmodule

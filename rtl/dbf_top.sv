// dbf_top: real-time 1-D deblocking filter for MPEG-4 video.
//
// One segment of ten pixels v0..v9 that crosses an 8x8 block boundary
// (between v4 and v5) is read from frame memory one pixel per cycle and
// eight filtered pixels v1'..v8' are written back, one per cycle, in the
// same order. Pixels flow through two shift-register banks: the input shift
// register (ISR, P9..P0) feeds the mode decision (MD), the default-mode
// filter (DF), the smooth-mode filter (SF) and the padding generator (CP);
// the output shift register (OSR, R1..R8) collects the result of whichever
// mode the decision picks. All blocks work in parallel on the one segment
// following a fixed schedule (dbf_ctrl), so that no pixel is stored twice.
//
// Interface: when ready is high, raise start with v0 on in_pix and the
// quantiser of the block that holds v5 on qp; drive v1..v9 on the nine
// following cycles (in_pix is not looked at otherwise). out_pix carries
// v1'..v8' in the eight cycles out_valid is high; out_mode tells which filter
// was applied. Latency from v0 to the last output pixel is 19 cycles without
// filtering or in default mode and 23 cycles in smooth mode; ready rises in
// the last output cycle, so segments can follow one another with no gap.
// Synchronous active-low reset. The block structure and the schedule follow
// the published architecture; the handshake is this design's own.
module dbf_top
  import dbf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output logic  ready,
  input  pix_t  in_pix,
  input  qp_t   qp,
  output logic  out_valid,
  output pix_t  out_pix,
  output mode_e out_mode
);

  // Control
  logic isr_en, qp_load, md_start, df_start, cp_start, cp_sel_hi;
  logic pad_lo, pad_hi, osr_shift, osr_load, osr_df_en;
  mode_e mode;

  qp_t  qp_q;
  always_ff @(posedge clk) begin
    if (!rst_n)       qp_q <= '0;
    else if (qp_load) qp_q <= qp;
  end

  dbf_ctrl u_ctrl (
    .clk, .rst_n, .start, .mode, .ready,
    .isr_en, .qp_load, .md_start, .df_start, .cp_start, .cp_sel_hi,
    .pad_lo, .pad_hi, .osr_shift, .osr_load, .osr_df_en, .out_valid,
    .seg_mode(out_mode)
  );

  // ISR and padding
  pix_t p [10];
  pix_t pad_pix;

  dbf_isr u_isr (
    .clk, .rst_n, .en(isr_en), .in_pix,
    .pad_lo, .pad_hi, .pad_pix, .p
  );

  dbf_cp u_cp (
    .clk, .rst_n, .start(cp_start),
    .end_pix(cp_sel_hi ? in_pix : p[5]),
    .nb_pix (cp_sel_hi ? p[9]   : p[6]),
    .qp(qp_q), .pad_pix
  );

  // Mode decision and default-mode filter
  pix_t df_v4, df_v5;
  logic df_on, df_valid, md_smooth, md_range_ok, md_valid;

  dbf_df u_df (
    .clk, .rst_n, .start(df_start),
    .d0(p[7]), .d1(p[8]), .d2(p[9]), .d3(in_pix),
    .v4(p[4]), .v5(p[5]), .qp(qp_q),
    .v4_out(df_v4), .v5_out(df_v5), .df_on, .res_valid(df_valid)
  );

  dbf_md u_md (
    .clk, .rst_n, .start(md_start),
    .cur_pix(in_pix), .prev_pix(p[9]), .qp(qp_q), .df_on,
    .smooth(md_smooth), .range_ok(md_range_ok), .mode, .dec_valid(md_valid)
  );

  // Smooth-mode filter
  pix_t sf_win [9];
  pix_t sf_out;
  always_comb for (int i = 0; i < 9; i++) sf_win[i] = p[i];

  dbf_sf u_sf (.clk, .rst_n, .p(sf_win), .px_out(sf_out));

  // Output shift register
  pix_t osr_in [8];
  always_comb for (int i = 0; i < 8; i++) osr_in[i] = p[i];

  dbf_osr u_osr (
    .clk, .rst_n, .shift(osr_shift), .load(osr_load), .df_en(osr_df_en),
    .sf_in(sf_out), .isr_pix(osr_in), .df_v4, .df_v5, .out_pix
  );

  // The decision and the DF result are produced together in T11, and smooth
  // mode is only chosen when both smooth-mode conditions hold.
  assert property (@(posedge clk) disable iff (!rst_n) md_valid == df_valid);
  assert property (@(posedge clk) disable iff (!rst_n)
                   md_valid && mode == MODE_SMOOTH |-> md_smooth && md_range_ok);

endmodule

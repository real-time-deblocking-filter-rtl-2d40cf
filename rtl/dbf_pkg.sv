// dbf_pkg: types and constants shared by the deblocking-filter blocks.
//
// The filter works on one segment of ten 8-bit pixels v0..v9 that straddles
// an 8x8 block boundary (the boundary lies between v4 and v5). The two
// thresholds of the mode decision, |dv| <= 2 for a "flat" pixel step and at
// least 6 flat steps for smooth mode, and the nine filter taps
// {1,1,2,2,4,2,2,1,1}/16 are the MPEG-4 deblocking algorithm's. The 5-bit
// quantiser width (QP 1..31) is the MPEG-4 range; the mode encoding is this
// design's own.
package dbf_pkg;

  localparam int unsigned PIX_W = 8;   // pixel width (ten 8-bit ISR registers)
  localparam int unsigned QP_W  = 5;   // quantiser parameter width, QP in 1..31
  localparam int unsigned THR1  = 2;   // |v_i - v_i+1| <= THR1 counts as flat
  localparam int unsigned THR2  = 6;   // F(v) >= THR2 selects smooth mode

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [QP_W-1:0]  qp_t;

  // Filtering mode of one segment.
  typedef enum logic [1:0] {
    MODE_NONE    = 2'd0,  // no filtering, v' = v
    MODE_DEFAULT = 2'd1,  // default mode: only v4 and v5 are corrected
    MODE_SMOOTH  = 2'd2   // smooth mode: nine-tap low-pass on v1..v8
  } mode_e;

  // Cycle numbers of the schedule, counted from T0 (the cycle that carries v0).
  localparam int unsigned T_CP_LO   = 5;   // CP reads v0, v1
  localparam int unsigned T_CP_HI   = 9;   // CP reads v8, v9
  localparam int unsigned T_DF      = 4;   // DF starts
  localparam int unsigned T_MD      = 1;   // MD starts
  localparam int unsigned T_SF      = 7;   // SF sees the window of v1'
  localparam int unsigned T_DEC     = 11;  // mode decision and DF result ready
  localparam int unsigned T_END_DEF = 19;  // last output pixel, default / no filter
  localparam int unsigned T_END_SM  = 23;  // last output pixel, smooth mode

endpackage

// dbf_sf: smooth-mode nine-tap low-pass filter (SF) of the deblocking filter.
//
// v'_n = (sum_{k=-4..4} b_k * P_n+k + 8) / 16,  b = {1,1,2,2,4,2,2,1,1},
// computed from the nine ISR registers P0..P8, whose centre P4 holds the
// pixel being filtered (the CP padding has already replaced the pixels
// beyond v1..v8). As in the published circuit the taps are summed by
// hard-wired adders in two pipeline stages:
//   stage 1 (registered): buf1 = P0+P1+P7+P8 (weight 1), buf2 = P2+P3+P5+P6
//                         (weight 2), buf3 = P4 (weight 4)
//   stage 2 (combinational, registered by the OSR): buf1 + 2*buf2, then + 4*buf3,
//                         weights being wired shifts.
// The adders are wide enough to keep every bit; the +8 rounding is this
// design's own choice (the published formula only divides by 16).
// Timing: one output per cycle; px_out shows the result for the window that
// was on p[] one cycle earlier.
module dbf_sf
  import dbf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  pix_t p [9],     // ISR registers P0..P8
  output pix_t px_out     // filtered centre pixel of the previous cycle's window
);

  logic [9:0] buf1, buf2;
  pix_t       buf3;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf1 <= '0; buf2 <= '0; buf3 <= '0;
    end else begin
      buf1 <= (10'(p[0]) + 10'(p[1])) + (10'(p[7]) + 10'(p[8]));
      buf2 <= (10'(p[2]) + 10'(p[3])) + (10'(p[5]) + 10'(p[6]));
      buf3 <= p[4];
    end
  end

  always_comb begin
    px_out = 8'(((12'(buf1) + {1'b0, buf2, 1'b0}) + {2'b0, buf3, 2'b00} + 12'd8) >> 4);
  end

endmodule

// dbf_isr: input shift register (ISR) of the deblocking filter.
//
// Ten pixel registers P9..P0. Every enabled cycle the pixel on in_pix enters
// P9 and the contents move one place towards P0, so a pixel read from memory
// at T_k is in P9 at T_k+1, in P8 at T_k+2, and so on. Five registers have a
// multiplexer in front of them so that a padding pixel from the CP block can
// take the place of the shifted value:
//   pad_lo : P3, P2, P1 and P0 all load pad_pix at once (padding of v0)
//   pad_hi : P8 loads pad_pix instead of P9 (padding of v9)
// All other modules read the registers through p[0..9]. The register count,
// the direction of the shift and the five multiplexed registers follow the
// published architecture; the active-low synchronous reset and the enable are
// this design's own.
module dbf_isr
  import dbf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,        // shift this cycle
  input  pix_t in_pix,    // pixel read from frame memory
  input  logic pad_lo,    // load pad_pix into P3..P0
  input  logic pad_hi,    // load pad_pix into P8
  input  pix_t pad_pix,   // padding pixel from CP
  output pix_t p [10]     // p[i] is register Pi
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 10; i++) p[i] <= '0;
    end else if (en) begin
      p[9] <= in_pix;
      p[8] <= pad_hi ? pad_pix : p[9];
      for (int i = 4; i < 8; i++) p[i] <= p[i+1];
      p[3] <= pad_lo ? pad_pix : p[4];
      for (int i = 0; i < 3; i++) p[i] <= pad_lo ? pad_pix : p[i+1];
    end
  end

endmodule

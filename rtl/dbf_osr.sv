// dbf_osr: output shift register (OSR) of the deblocking filter.
//
// Eight registers R1..R8 hold the eight filtered pixels v1'..v8' of a
// segment; R8 drives out_pix, which is written back over the original pixels
// in frame memory, v1' first. Each register has a multiplexer in front of it:
//   shift        : R1 <= sf_in, R_k <= R_k-1. Smooth mode fills the chain
//                  from the SF output this way, and every mode empties it
//                  through R8 this way.
//   load         : R8..R1 <= v1..v8 from the ISR in one cycle (no filtering).
//   load & df_en : as load, but v4 and v5 are replaced by the DF results
//                  (default mode). With v1 in R8, v4 sits in R5 and v5 in R4.
// load wins over shift. The three sources and the single output through R8
// follow the published architecture. The published figure draws the DF
// results entering R3 and R4; with the v1-first output order chosen here the
// boundary pixels sit in R5 and R4, so that is where DF writes.
module dbf_osr
  import dbf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  logic load,
  input  logic df_en,
  input  pix_t sf_in,         // SF output
  input  pix_t isr_pix [8],   // v1..v8 (ISR P0..P7 in T11)
  input  pix_t df_v4,
  input  pix_t df_v5,
  output pix_t out_pix        // R8
);

  pix_t r [1:8];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 1; k <= 8; k++) r[k] <= '0;
    end else if (load) begin
      for (int k = 1; k <= 8; k++) r[k] <= isr_pix[8-k];
      if (df_en) begin
        r[5] <= df_v4;
        r[4] <= df_v5;
      end
    end else if (shift) begin
      r[1] <= sf_in;
      for (int k = 2; k <= 8; k++) r[k] <= r[k-1];
    end
  end

  assign out_pix = r[8];

endmodule

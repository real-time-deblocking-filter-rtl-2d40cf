// dbf_cp: padding-pixel generator (CP) of the deblocking filter.
//
// The nine-tap smooth filter needs pixels beyond v1..v8. Those are replaced
// by a padding pixel: P0 = v0 if |v1 - v0| < QP, else v1, and likewise
// P9 = v9 if |v8 - v9| < QP, else v8. CP computes one such pixel from an
// end pixel (v0 or v9) and its inner neighbour (v1 or v8).
//
// Timing: two cycles, as published. In the cycle start is high the operands
// are compared and registered; in the next cycle pad_pix shows the chosen
// pixel combinationally, so the ISR can load it at the end of that cycle.
// pad_pix then holds its value until the next start. The split of the work
// into a compare stage and a select stage is this design's own.
module dbf_cp
  import dbf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,     // operands valid this cycle
  input  pix_t end_pix,   // v0 or v9
  input  pix_t nb_pix,    // v1 or v8
  input  qp_t  qp,
  output pix_t pad_pix
);

  pix_t end_q, nb_q;
  logic near_q;            // |end - nb| < QP
  logic [PIX_W-1:0] diff;

  always_comb diff = (end_pix > nb_pix) ? end_pix - nb_pix : nb_pix - end_pix;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      end_q  <= '0;
      nb_q   <= '0;
      near_q <= 1'b0;
    end else if (start) begin
      end_q  <= end_pix;
      nb_q   <= nb_pix;
      near_q <= diff < PIX_W'(qp);
    end
  end

  assign pad_pix = near_q ? end_q : nb_q;

endmodule

// ldpc_encoder: efficient LDPC encoder for one 8-bit pixel.
//
// Follows the efficient-encoding steps with T = identity (so T^-1 = T):
//   p1 = phi^-1 (E T^-1 A + C) s     (precomputed matrix P1_MATRIX)
//   p2 = T^-1 (A s + B p1) = A s + B p1
//   c  = [s p1 p2]
// Over GF(2) every product is an AND and every sum an XOR, and all rows are
// computed in parallel. A and B are the top-left blocks of the parity-check
// matrix H in ldpc_pkg.
//
// Interface: valid/ready stream. The codeword is registered, so it appears one
// cycle after the pixel is accepted; a new pixel is accepted every cycle while
// the output is free or being taken (in_ready_o = !out_valid_o || out_ready_i).
module ldpc_encoder
  import ldpc_pkg::*;
(
  input  logic      clk_i,
  input  logic      rst_ni,
  input  logic      in_valid_i,
  output logic      in_ready_o,
  input  message_t  in_pixel_i,
  output logic      out_valid_o,
  input  logic      out_ready_i,
  output codeword_t out_codeword_o
);

  p1_t       p1;
  p2_t       p2;
  codeword_t cw;

  always_comb begin
    for (int i = 0; i < GAP; i++) p1[i] = ^(in_pixel_i & P1_MATRIX[i]);
    for (int i = 0; i < M - GAP; i++)
      p2[i] = ^(in_pixel_i & H[i][0:K-1]) ^ ^(p1 & H[i][K:K+GAP-1]);
    cw = {in_pixel_i, p1, p2};
  end

  assign in_ready_o = !out_valid_o || out_ready_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      out_valid_o    <= 1'b0;
      out_codeword_o <= '0;
    end else if (in_ready_o) begin
      out_valid_o <= in_valid_i;
      if (in_valid_i) out_codeword_o <= cw;
    end
  end

endmodule

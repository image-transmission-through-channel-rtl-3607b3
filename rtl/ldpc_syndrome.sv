// ldpc_syndrome: syndrome S = r * H^T of a received word.
//
// Each check node i XORs the received bits that row i of the parity-check matrix
// connects to it. A zero syndrome means r is a codeword. All eight checks are
// evaluated in parallel (the loops are fully unrolled), so the block is purely
// combinational: word in, syndrome out in the same cycle.
// The matrix is a parameter (NB columns, MC rows, row 0 in the most significant
// bits of HM); the defaults are the 8 x 16 matrix of the image code.
module ldpc_syndrome
  import ldpc_pkg::*;
#(
  parameter int unsigned       NB = N,       // code length
  parameter int unsigned       MC = M,       // parity checks
  parameter logic [MC*NB-1:0]  HM = H_FLAT   // parity-check matrix, flattened
) (
  input  logic [0:NB-1] word_i,      // received word r, bit 0 first
  output logic [0:MC-1] syndrome_o,  // S, bit i = parity of check i
  output logic          zero_o       // S == 0
);

  always_comb begin
    for (int i = 0; i < MC; i++) syndrome_o[i] = ^(word_i & HM[(MC-1-i)*NB +: NB]);
    zero_o = (syndrome_o == '0);
  end

endmodule

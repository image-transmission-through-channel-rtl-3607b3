// ldpc_pkg: types and constants of the (16,8) LDPC code used for pixel transmission.
//
// One 8-bit grey-scale pixel is the message s; the codeword is c = [s p1 p2] with
// four bits p1 and four bits p2 (code rate 1/2). Bit positions are numbered from
// the left, 0..15, and the types use ascending ranges so that c[0] is the first
// (most significant) message bit, matching the way codewords are printed.
//
// The parity-check matrix is in approximate lower-triangular form with gap 4:
//
//        cols 0..7   8..11   12..15
//   H = [   A          B        T  ]   rows 0..3   (T = identity)
//       [   C          D        E  ]   rows 4..7
//
// P1_MATRIX is phi^-1 (E T^-1 A + C) (GF(2), so all minus signs vanish); it is the
// matrix that the encoder applies to s to get p1. The rows of P1_MATRIX, the code
// length, gap and T = I follow the published design. The complete H was chosen
// here: it is consistent with P1_MATRIX, reproduces every published codeword
// (0, 1, 2, 50, 175, 255 -> 0000, 01B4, 02CE, 32D9, AFFA, FF9B in hex), has
// column 5 equal to 10101100 as in the published decoding example, and lets one
// bit-flipping pass (two for bit 11) correct every single-bit error.
package ldpc_pkg;

  localparam int unsigned N = 16;        // codeword length
  localparam int unsigned K = 8;         // message length (one pixel)
  localparam int unsigned M = N - K;     // parity checks
  localparam int unsigned GAP = 4;       // g: number of p1 bits

  typedef logic [0:K-1]     message_t;   // s, s[0] = pixel MSB
  typedef logic [0:N-1]     codeword_t;  // c = [s p1 p2]
  typedef logic [0:M-1]     syndrome_t;  // one bit per check node
  typedef logic [0:GAP-1]   p1_t;
  typedef logic [0:M-GAP-1] p2_t;

  // Parity-check matrix, row i = check node i, bit j = variable node j.
  localparam codeword_t H [M] = '{
    16'b0001110101011000,
    16'b0101100010000100,
    16'b1110111100100010,
    16'b1001000011100001,
    16'b0010111010111101,
    16'b1000011001010111,
    16'b0111001011000101,
    16'b0011000110101110
  };

  // The same matrix flattened, row 0 in the most significant bits, for the
  // blocks that take a parity-check matrix as a parameter.
  localparam logic [M*N-1:0] H_FLAT = {H[0], H[1], H[2], H[3], H[4], H[5], H[6], H[7]};

  // phi^-1 (E T^-1 A + C), row i gives p1[i].
  localparam message_t P1_MATRIX [GAP] = '{
    8'b11111011,
    8'b00111010,
    8'b01000001,
    8'b10100001
  };

endpackage

// crc_redundancy_gen: computes the 16 redundancy bits of a 16-bit data word.
//
// The data word is viewed as the 4x4 matrix of crc_pkg (rows W, X, Y, Z; columns 1..4).
// Three families of XOR trees are formed, exactly as the scheme defines them:
//   diagonal bits  D1 = W1^X2^Y1^Z2, D2 = W2^X1^Y2^Z1, D3 = W3^X4^Y3^Z4, D4 = W4^X3^Y4^Z3
//   parity bits    Pc = Wc^Xc^Yc^Zc for each column c (even parity)
//   check bits     Cr13 = r1^r3 and Cr24 = r2^r4 for each row r
// Every data bit therefore lands in exactly one diagonal, one parity and one check bit.
// The same block is used by the encoder (to build the codeword) and by the decoder (to
// recompute the redundancy of the received data). Even parity is this design's choice.
//
// Interface: data_i (16 bits, W1 = bit 15) in, red_o (crc_pkg::redundancy_t) out.
// Timing: purely combinational, at most three XOR levels (four-input trees).
module crc_redundancy_gen
  import crc_pkg::*;
(
  input  logic [DATA_W-1:0] data_i,
  output redundancy_t       red_o
);

  matrix_t m;
  assign m = to_matrix(data_i);

  always_comb begin
    red_o = '0;
    for (int unsigned r = 0; r < ROWS; r++) begin
      for (int unsigned c = 0; c < COLS; c++) begin
        red_o.p[c]             ^= m[r][c];
        red_o.d[diag_index(r, c)] ^= m[r][c];
        red_o.c[r][c % 2]      ^= m[r][c];
      end
    end
  end

endmodule

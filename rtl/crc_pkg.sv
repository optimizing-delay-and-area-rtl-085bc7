// crc_pkg: types and constants shared by the diagonal/parity/check error-correcting
// encoder and decoder.
//
// The 16 data bits form a 4x4 matrix with rows W, X, Y, Z and columns 1..4. Row W is
// the most significant nibble and column 1 the most significant bit of a row, so
// W1 = data[15], W4 = data[12], X1 = data[11], ..., Z4 = data[0] (this bit ordering is
// a choice of this design). Sixteen redundancy bits protect them:
//   D1..D4  diagonal bits, one per "diagonal" of each two-column half,
//   P1..P4  column parity bits,
//   C[r][k] row check bits, C[r][0] = r1 ^ r3 and C[r][1] = r2 ^ r4 for each row r.
// The transmitted codeword is {C, P, D, data}, 32 bits: data in [15:0], D1..D4 in
// [19:16], P1..P4 in [23:20] and Cw13, Cw24, Cx13, ..., Cz24 in [31:24].
package crc_pkg;

  localparam int unsigned ROWS    = 4;
  localparam int unsigned COLS    = 4;
  localparam int unsigned DATA_W  = ROWS * COLS;   // 16
  localparam int unsigned RED_W   = 4 + 4 + 8;     // diagonal + parity + check bits
  localparam int unsigned CODE_W  = DATA_W + RED_W; // 32

  // Data matrix: m[r][c], r = 0..3 for W..Z, c = 0..3 for columns 1..4.
  typedef logic [0:ROWS-1][0:COLS-1] matrix_t;

  // Redundancy bits, each field most significant first: d[0] is D1, p[0] is P1,
  // c[r][0] is C<r>13 and c[r][1] is C<r>24 (c[0][0] = Cw13 is the codeword's MSB).
  typedef struct packed {
    logic [0:ROWS-1][0:1] c;   // 8 check bits,    codeword bits [31:24]
    logic [0:COLS-1]      p;   // 4 parity bits,   codeword bits [23:20]
    logic [0:3]           d;   // 4 diagonal bits, codeword bits [19:16]
  } redundancy_t;

  typedef struct packed {
    redundancy_t      red;     // codeword bits [31:16]
    logic [DATA_W-1:0] data;   // codeword bits [15:0]
  } codeword_t;

  // Region chosen by the decoder from the diagonal and parity syndromes.
  typedef enum logic [1:0] {
    REGION_NONE = 2'd0,  // not used by the selector; reserved
    REGION_1    = 2'd1,  // errors in columns 1-2
    REGION_2    = 2'd2,  // errors in columns 3-4
    REGION_3    = 2'd3   // one error in each half, or none
  } region_e;

  // Index (0..3 for D1..D4) of the diagonal bit that covers matrix position (r, c).
  // D1 = W1^X2^Y1^Z2 and D2 = W2^X1^Y2^Z1 cover columns 1-2, D3 and D4 columns 3-4.
  function automatic int unsigned diag_index(int unsigned r, int unsigned c);
    return 2 * (c / 2) + ((r + c) % 2);
  endfunction

  function automatic matrix_t to_matrix(logic [DATA_W-1:0] data);
    return matrix_t'(data);
  endfunction

endpackage

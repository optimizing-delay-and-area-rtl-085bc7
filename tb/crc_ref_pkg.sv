// crc_ref_pkg: reference model used by the testbenches, written independently of the RTL.
//
// ref_red spells out every diagonal, parity and check bit as a literal XOR of named
// matrix bits. ref_decode finds the expected correction by brute force: it searches all
// 137 data-error patterns of weight 0, 1 or 2 for those whose syndrome equals the
// received one, and reports the pattern when exactly one n_match.
package crc_ref_pkg;

  // Redundancy {Cw13,Cw24,Cx13,Cx24,Cy13,Cy24,Cz13,Cz24, P1..P4, D1..D4} of a data word
  // whose bit 15 is W1 and bit 0 is Z4.
  function automatic logic [15:0] ref_red(logic [15:0] v);
    logic w1, w2, w3, w4, x1, x2, x3, x4, y1, y2, y3, y4, z1, z2, z3, z4;
    {w1, w2, w3, w4, x1, x2, x3, x4, y1, y2, y3, y4, z1, z2, z3, z4} = v;
    return {w1 ^ w3, w2 ^ w4, x1 ^ x3, x2 ^ x4, y1 ^ y3, y2 ^ y4, z1 ^ z3, z2 ^ z4,
            w1 ^ x1 ^ y1 ^ z1, w2 ^ x2 ^ y2 ^ z2, w3 ^ x3 ^ y3 ^ z3, w4 ^ x4 ^ y4 ^ z4,
            w1 ^ x2 ^ y1 ^ z2, w2 ^ x1 ^ y2 ^ z1, w3 ^ x4 ^ y3 ^ z4, w4 ^ x3 ^ y4 ^ z3};
  endfunction

  function automatic logic [31:0] ref_encode(logic [15:0] v);
    return {ref_red(v), v};
  endfunction

  function automatic logic [15:0] ref_syndrome(logic [31:0] code);
    return ref_red(code[15:0]) ^ code[31:16];
  endfunction

  // Expected region from the rule on diagonal (bits 3:0 = SD1..SD4) and parity
  // (bits 7:4 = SP1..SP4) syndromes: 1 = columns 1-2, 2 = columns 3-4, 3 = equal sums.
  function automatic logic [1:0] ref_region(logic [15:0] syn);
    int left, right;
    left  = int'(syn[3]) + int'(syn[2]) + int'(syn[7]) + int'(syn[6]);
    right = int'(syn[1]) + int'(syn[0]) + int'(syn[5]) + int'(syn[4]);
    if (left > right) return 2'd1;
    if (left < right) return 2'd2;
    return 2'd3;
  endfunction

  // Brute-force decoder: is_unique = 1 when exactly one data pattern of weight <= 2 has the
  // received syndrome; pattern is then that error pattern.
  function automatic void ref_decode(logic [31:0] code, output logic is_unique,
                                     output logic [15:0] pattern);
    logic [15:0] syn, e;
    int n_match;
    syn = ref_syndrome(code);
    n_match = 0;
    pattern = '0;
    if (syn == '0) n_match++;                        // weight 0
    for (int i = 0; i < 16; i++) begin
      e = 16'(1) << i;                               // weight 1
      if (ref_red(e) == syn) begin
        n_match++;
        pattern = e;
      end
      for (int j = i + 1; j < 16; j++) begin
        e = (16'(1) << i) | (16'(1) << j);           // weight 2
        if (ref_red(e) == syn) begin
          n_match++;
          pattern = e;
        end
      end
    end
    is_unique = (n_match == 1);
  endfunction

  // The k-th data error pattern, k = 0..136: 0 is no error, 1..16 single errors
  // (bit k-1), 17..136 the 120 double errors in order (i, j), i < j.
  function automatic logic [15:0] ref_pattern(int k);
    int n;
    if (k == 0) return '0;
    if (k <= 16) return 16'(1) << (k - 1);
    n = 17;
    for (int i = 0; i < 16; i++)
      for (int j = i + 1; j < 16; j++) begin
        if (n == k) return (16'(1) << i) | (16'(1) << j);
        n++;
      end
    return '0;
  endfunction

  localparam int NUM_PATTERNS = 137;

endpackage

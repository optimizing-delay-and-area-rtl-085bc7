// crc_ecc_top: both ends of a link protected by the diagonal/parity/check code.
//
// The sender half (crc_encoder) turns data_i into the 32-bit codeword code_o, which is
// what goes onto the channel. The receiver half (crc_decoder) takes a codeword code_i
// from the channel, corrects up to two data-bit errors and presents data_o. The channel
// itself lies outside; connecting code_o to code_i gives an error-free loop, and
// flipping bits in between models transmission errors. The scheme describes encoder and
// decoder as two combinational circuits; putting both in one top, with the channel
// between code_o and code_i left to the user, is this design's choice.
//
// Interface: data_i (16) -> code_o (32); code_i (32) -> data_o (16), region_o (2 bits,
// 1/2/3 as in crc_pkg::region_e), error_o (syndrome not zero), flip_o (16, corrected
// bits). Codeword layout: [15:0] data, [19:16] D1..D4, [23:20] P1..P4, [31:24] check
// bits Cw13, Cw24, Cx13, Cx24, Cy13, Cy24, Cz13, Cz24.
// Timing: both halves are combinational; there is no clock and no reset.
module crc_ecc_top
  import crc_pkg::*;
(
  input  logic [DATA_W-1:0] data_i,
  output logic [CODE_W-1:0] code_o,
  input  logic [CODE_W-1:0] code_i,
  output logic [DATA_W-1:0] data_o,
  output logic [1:0]        region_o,
  output logic              error_o,
  output logic [DATA_W-1:0] flip_o
);

  codeword_t enc_code;
  region_e   region;

  crc_encoder u_enc (
    .data_i (data_i),
    .code_o (enc_code)
  );

  crc_decoder u_dec (
    .code_i   (codeword_t'(code_i)),
    .data_o   (data_o),
    .region_o (region),
    .error_o  (error_o),
    .flip_o   (flip_o)
  );

  assign code_o   = enc_code;
  assign region_o = region;

endmodule

// crc_encoder: sender side of the diagonal/parity/check error-correcting code.
//
// It appends the redundancy of crc_redundancy_gen to the 16 data bits and presents the
// 32-bit codeword {C, P, D, data} (layout in crc_pkg). The data bits are passed
// unchanged, so the code is systematic and a receiver can strip the redundancy by
// taking the low 16 bits.
//
// Interface: data_i (16 bits) in, code_o (crc_pkg::codeword_t, 32 bits) out.
// Timing: combinational, no clock and no state; the output follows the input within
// one propagation delay.
module crc_encoder
  import crc_pkg::*;
(
  input  logic [DATA_W-1:0] data_i,
  output codeword_t         code_o
);

  redundancy_t red;

  crc_redundancy_gen u_gen (
    .data_i (data_i),
    .red_o  (red)
  );

  assign code_o = '{red: red, data: data_i};

endmodule

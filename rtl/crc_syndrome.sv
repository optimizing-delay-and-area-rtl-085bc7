// crc_syndrome: syndrome generator of the decoder.
//
// The redundancy of the received data bits is recomputed with crc_redundancy_gen and
// XORed with the received redundancy bits. The result holds one syndrome bit per
// redundancy bit: SD1..SD4 (diagonal), SP1..SP4 (parity) and SC (check). A zero syndrome
// means no detectable error; each data-bit error sets exactly one SD, one SP and one SC
// bit.
//
// Interface: code_i (crc_pkg::codeword_t) in, syn_o (crc_pkg::redundancy_t) out, laid
// out like the redundancy so that syn_o.d[i] is SD(i+1) and so on.
// Timing: combinational.
module crc_syndrome
  import crc_pkg::*;
(
  input  codeword_t   code_i,
  output redundancy_t syn_o
);

  redundancy_t recomputed;

  crc_redundancy_gen u_gen (
    .data_i (code_i.data),
    .red_o  (recomputed)
  );

  assign syn_o = recomputed ^ code_i.red;

endmodule

// crc_decoder: receiver side of the diagonal/parity/check error-correcting code.
//
// The received 32-bit codeword passes three stages, all combinational:
//   crc_syndrome       recomputes D, P and C from the received data and XORs them with
//                      the received redundancy (SD, SP, SC);
//   crc_region_select  compares SD1+SD2+SP1+SP2 with SD3+SD4+SP3+SP4 and picks region
//                      1 (columns 1-2), 2 (columns 3-4) or 3 (one error per half);
//   crc_corrector      flips the data bits located by the syndrome in that region.
// The redundancy is then dropped and the 16 corrected data bits are presented. Single
// and double data-bit errors are corrected as described in crc_corrector.
//
// Interface: code_i (crc_pkg::codeword_t) in; data_o (16 bits), region_o, error_o (any
// syndrome bit set) and flip_o (bits that were flipped) out. error_o and flip_o are
// status outputs added by this design.
// Timing: combinational, no clock or state.
module crc_decoder
  import crc_pkg::*;
(
  input  codeword_t         code_i,
  output logic [DATA_W-1:0] data_o,
  output region_e           region_o,
  output logic              error_o,
  output logic [DATA_W-1:0] flip_o
);

  redundancy_t syn;

  crc_syndrome u_syn (
    .code_i (code_i),
    .syn_o  (syn)
  );

  crc_region_select u_region (
    .sd_i     (syn.d),
    .sp_i     (syn.p),
    .region_o    (region_o)
  );

  crc_corrector u_corr (
    .data_i   (code_i.data),
    .syn_i    (syn),
    .region_i (region_o),
    .data_o   (data_o),
    .flip_o   (flip_o)
  );

  assign error_o = |syn;

endmodule

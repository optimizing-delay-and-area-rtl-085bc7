// crc_region_select: chooses the region of the data matrix the decoder corrects in.
//
// The left sum SD1+SD2+SP1+SP2 counts the diagonal and parity syndromes of columns 1-2,
// the right sum SD3+SD4+SP3+SP4 those of columns 3-4. The selection rule is the one
// the scheme defines; the 2-bit region encoding is this design's choice:
//   left > right  -> REGION_1 (the errors lie in columns 1-2)
//   left < right  -> REGION_2 (the errors lie in columns 3-4)
//   left == right -> REGION_3 (one error in each half, or no data error)
// Each sum is a 3-bit population count of four syndrome bits followed by one magnitude
// comparator.
//
// Interface: sd_i, sp_i (4 bits each, index 0 = SD1 / SP1) in; region_o
// (crc_pkg::region_e) out.
// Timing: combinational.
module crc_region_select
  import crc_pkg::*;
(
  input  logic [0:3] sd_i,
  input  logic [0:3] sp_i,
  output region_e    region_o
);

  logic [2:0] left_sum, right_sum;

  assign left_sum  = 3'(sd_i[0]) + 3'(sd_i[1]) + 3'(sp_i[0]) + 3'(sp_i[1]);
  assign right_sum = 3'(sd_i[2]) + 3'(sd_i[3]) + 3'(sp_i[2]) + 3'(sp_i[3]);

  always_comb begin
    if (left_sum > right_sum)      region_o = REGION_1;
    else if (left_sum < right_sum) region_o = REGION_2;
    else                               region_o = REGION_3;
  end

endmodule

// crc_corrector: flips the received data bits that the syndrome and the region point at.
//
// How the bits are located inside a region is this design's own rule; the scheme only
// says that errors are corrected region by region. Within one two-column half each
// column falls in a different check-bit class (columns 1 and 3 feed Cr13, columns 2 and 4
// feed Cr24), so when all errors lie in one half the check syndrome SC is a direct map
// of them:
//   REGION_1: flip (r, c) in columns 1-2 when SC[r][class of c] is set
//   REGION_2: flip (r, c) in columns 3-4 when SC[r][class of c] is set
//   REGION_3: at most one error per half; flip (r, c) when its parity syndrome SP[c],
//             its diagonal syndrome SD[diag(r,c)] and its check syndrome SC[r][class]
//             are all set (the column comes from SP, the row parity from SD, the row
//             from SC)
// This corrects every single data-bit error and every double data-bit error whose
// syndrome differs from that of all other patterns of weight two or less (96 of the 120
// double errors). The remaining 24 pairs, both bits in rows {W,Y} or both in rows {X,Z}
// and columns {1,3} or {2,4}, share their syndrome with another pair and cannot be
// corrected by any decoder of this code. A single error in a redundancy bit never
// changes the data.
//
// Interface: data_i (16 received data bits), syn_i (syndrome), region_i in; data_o
// (corrected data) and flip_o (mask of flipped bits) out.
// Timing: combinational, one AND-OR level per bit and one XOR.
module crc_corrector
  import crc_pkg::*;
(
  input  logic [DATA_W-1:0] data_i,
  input  redundancy_t       syn_i,
  input  region_e           region_i,
  output logic [DATA_W-1:0] data_o,
  output logic [DATA_W-1:0] flip_o
);

  matrix_t flip_m;

  always_comb begin
    flip_m = '0;
    for (int unsigned r = 0; r < ROWS; r++) begin
      for (int unsigned c = 0; c < COLS; c++) begin
        unique case (region_i)
          REGION_1: flip_m[r][c] = (c < 2) && syn_i.c[r][c % 2];
          REGION_2: flip_m[r][c] = (c >= 2) && syn_i.c[r][c % 2];
          REGION_3: flip_m[r][c] = syn_i.p[c] && syn_i.d[diag_index(r, c)]
                                   && syn_i.c[r][c % 2];
          default:  flip_m[r][c] = 1'b0;
        endcase
      end
    end
  end

  assign flip_o = flip_m;
  assign data_o = data_i ^ flip_o;

endmodule

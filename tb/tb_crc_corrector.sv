// tb_crc_corrector: the corrector is driven with received data, the reference syndrome
// and the reference region for all 137 data-error patterns of weight <= 2 on random
// words. Where the brute-force reference finds a unique pattern, the corrector must flip
// exactly that pattern and restore the data; each region must be exercised.
module tb_crc_corrector;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  localparam int WORDS = 200;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] data_rx, data_out, flip;
  logic [15:0] syn;
  logic [1:0]  region;
  int checks = 0, failures = 0;
  int corrected [1:3] = '{0, 0, 0};

  crc_corrector dut (
    .data_i   (data_rx),
    .syn_i    (redundancy_t'(syn)),
    .region_i (region_e'(region)),
    .data_o   (data_out),
    .flip_o   (flip)
  );

  initial begin
    repeat (WORDS * NUM_PATTERNS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v, e, pat;
    logic [31:0] rx;
    logic        is_unique;
    data_rx = '0; syn = '0; region = 2'd3;
    for (int n = 0; n < WORDS; n++) begin
      v = 16'($urandom);
      for (int k = 0; k < NUM_PATTERNS; k++) begin
        e  = ref_pattern(k);
        rx = ref_encode(v) ^ {16'h0000, e};
        ref_decode(rx, is_unique, pat);
        @(negedge clk);
        data_rx = rx[15:0];
        syn     = ref_syndrome(rx);
        region  = ref_region(syn);
        @(posedge clk);
        if (is_unique) begin
          checks++;
          if (data_out !== v || flip !== e) begin
            failures++;
            if (failures < 10)
              $display("data %h error %h region %0d: out %h flip %h", v, e, region,
                       data_out, flip);
          end else if (e != 0) corrected[region]++;
        end
      end
    end
    for (int r = 1; r <= 3; r++) begin
      checks++;
      if (corrected[r] == 0) begin
        failures++;
        $display("no correction seen in region %0d", r);
      end
    end
    $display("corrections per region: 1=%0d 2=%0d 3=%0d", corrected[1], corrected[2],
             corrected[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_crc_region_select: all 256 combinations of the diagonal and parity syndromes are
// applied and the region is compared with the sum rule computed by crc_ref_pkg.
module tb_crc_region_select;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [0:3] sd, sp;
  region_e    region;
  int checks = 0, failures = 0;
  int seen [1:3] = '{0, 0, 0};

  crc_region_select dut (.sd_i(sd), .sp_i(sp), .region_o(region));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp;
    sd = '0; sp = '0;
    for (int v = 0; v < 256; v++) begin
      @(negedge clk);
      {sp, sd} = 8'(v);
      @(posedge clk);
      exp = ref_region({8'h00, sp, sd});
      checks++;
      if (2'(region) !== exp) begin
        failures++;
        $display("sd %b sp %b: region %0d expected %0d", sd, sp, region, exp);
      end
      if (exp != 0) seen[exp]++;
    end
    for (int r = 1; r <= 3; r++) begin
      checks++;
      if (seen[r] == 0) failures++;
    end
    $display("region counts: 1=%0d 2=%0d 3=%0d", seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

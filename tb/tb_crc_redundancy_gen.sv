// tb_crc_redundancy_gen: exhaustive check of the diagonal, parity and check bits.
// All 65536 data words are applied, one per clock; each output is compared with the
// literal XOR equations of crc_ref_pkg in the same cycle (the block is combinational).
module tb_crc_redundancy_gen;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] data;
  redundancy_t red;
  int checks = 0, failures = 0;

  crc_redundancy_gen dut (.data_i(data), .red_o(red));

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = '0;
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk);
      data = 16'(v);
      @(posedge clk);                      // zero-cycle latency: sampled in the same cycle
      checks++;
      if (16'(red) !== ref_red(data)) begin
        failures++;
        if (failures < 10)
          $display("data %h: red %h expected %h", data, 16'(red), ref_red(data));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

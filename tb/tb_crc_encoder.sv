// tb_crc_encoder: exhaustive check of the 32-bit codeword for all 65536 data words,
// against crc_ref_pkg::ref_encode, sampled in the same cycle the data is applied.
module tb_crc_encoder;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] data;
  codeword_t   code;
  int checks = 0, failures = 0;

  crc_encoder dut (.data_i(data), .code_o(code));

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
      @(posedge clk);
      checks++;
      if (32'(code) !== ref_encode(data)) begin
        failures++;
        if (failures < 10)
          $display("data %h: code %h expected %h", data, 32'(code), ref_encode(data));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_crc_syndrome: the syndrome of clean codewords must be zero, a single data-bit error
// must set exactly one diagonal, one parity and one check syndrome bit, and a random
// corrupted codeword must give the reference syndrome.
module tb_crc_syndrome;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] code;
  redundancy_t syn;
  int checks = 0, failures = 0;

  crc_syndrome dut (.code_i(codeword_t'(code)), .syn_o(syn));

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: code %h syndrome %h expected %h", what, code, got, exp);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    code = '0;
    for (int n = 0; n < 2000; n++) begin
      v = 16'($urandom);
      @(negedge clk); code = ref_encode(v);
      @(posedge clk); check("clean", 16'(syn), 16'h0000);
      for (int b = 0; b < 16; b++) begin
        @(negedge clk); code = ref_encode(v) ^ (32'(1) << b);
        @(posedge clk);
        check("single weight", 16'($countones(syn.d)) << 8 | 16'($countones(syn.p)) << 4
              | 16'($countones(syn.c)), 16'h0111);
      end
      @(negedge clk); code = ref_encode(v) ^ $urandom;
      @(posedge clk); check("random", 16'(syn), ref_syndrome(code));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

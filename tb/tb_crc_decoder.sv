// tb_crc_decoder: the decoder receives codewords of random words corrupted by every
// data-error pattern of weight <= 2 and by every single redundancy-bit error. Checks:
// the region and error flag agree with the reference; data is restored whenever the
// brute-force reference finds a unique pattern (all 16 single and 96 of the 120 double
// data errors); a redundancy-bit error never alters the data.
module tb_crc_decoder;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  localparam int WORDS = 200;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] code;
  logic [15:0] data_out, flip;
  region_e     region;
  logic        err;
  int checks = 0, failures = 0;
  int n_unique_double = 0;

  crc_decoder dut (
    .code_i   (codeword_t'(code)),
    .data_o   (data_out),
    .region_o (region),
    .error_o  (err),
    .flip_o   (flip)
  );

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: code %h got %h expected %h", what, code, got, exp);
    end
  endtask

  initial begin
    repeat (WORDS * (NUM_PATTERNS + 16) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v, e, pat;
    logic        is_unique;
    code = '0;
    for (int n = 0; n < WORDS; n++) begin
      v = 16'($urandom);
      for (int k = 0; k < NUM_PATTERNS; k++) begin
        e = ref_pattern(k);
        @(negedge clk);
        code = ref_encode(v) ^ {16'h0000, e};
        ref_decode(code, is_unique, pat);
        @(posedge clk);
        expect_eq("region", 32'(region), 32'(ref_region(ref_syndrome(code))));
        expect_eq("error flag", 32'(err), 32'(e != 0));
        if (is_unique) begin
          expect_eq("data", 32'(data_out), 32'(v));
          if (n == 0 && k > 16) n_unique_double++;
        end
      end
      for (int b = 16; b < 32; b++) begin
        @(negedge clk);
        code = ref_encode(v) ^ (32'(1) << b);
        @(posedge clk);
        expect_eq("redundancy error", 32'(data_out), 32'(v));
        expect_eq("redundancy error flag", 32'(err), 32'(1));
      end
    end
    expect_eq("correctable double errors", 32'(n_unique_double), 32'd96);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

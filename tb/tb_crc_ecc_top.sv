// tb_crc_ecc_top: end-to-end test of the link at its default (and only) size.
//
// The encoder output is passed through a model channel that flips chosen codeword bits
// and is fed back into the decoder of the same top. Traffic:
//   - all 65536 data words, each sent clean and with every one of the 32 single-bit
//     codeword errors (16 data bits, 16 redundancy bits);
//   - 2048 random words, each with all 120 double data-bit errors.
// The expected result comes from a table built by brute-force search over all error
// patterns of weight <= 2 (crc_ref_pkg), independent of the region logic. Each mechanism
// of the design is counted and must occur: clean pass-through, single-error correction,
// double-error correction in region 1, 2 and 3, redundancy-bit errors that leave the
// data alone, and double errors that are detected but cannot be told apart.
module tb_crc_ecc_top;
  import crc_ref_pkg::*;

  localparam int DOUBLE_WORDS = 2048;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] data_in, data_out, flip;
  logic [31:0] code_tx, code_rx, channel_err;
  logic [1:0]  region;
  logic        err;
  int checks = 0, failures = 0;

  // Syndrome table: number of weight <= 2 data patterns per syndrome and the pattern.
  byte         tbl_count [65536];
  logic [15:0] tbl_pat   [65536];

  // Mechanism counters.
  int n_clean = 0, n_single = 0, n_red_err = 0, n_ambiguous = 0;
  int n_double [1:3] = '{0, 0, 0};

  crc_ecc_top dut (
    .data_i   (data_in),
    .code_o   (code_tx),
    .code_i   (code_rx),
    .data_o   (data_out),
    .region_o (region),
    .error_o  (err),
    .flip_o   (flip)
  );

  assign code_rx = code_tx ^ channel_err;   // channel model

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("%s: data %h error %h got %h expected %h", what, data_in, channel_err, got,
                 exp);
    end
  endtask

  // Applies one word and one channel error; checks the result in the same cycle.
  task automatic send(logic [15:0] v, logic [31:0] e);
    logic [15:0] s;
    @(negedge clk);
    data_in     = v;
    channel_err = e;
    @(posedge clk);
    s = ref_syndrome(code_rx);
    expect_eq("codeword", code_tx, ref_encode(v));
    expect_eq("error flag", 32'(err), 32'(e != 0));
    expect_eq("region", 32'(region), 32'(ref_region(s)));
    if (e[31:16] != 0) begin                  // one redundancy bit in error
      expect_eq("data after redundancy error", 32'(data_out), 32'(v));
      if (data_out == v) n_red_err++;
    end else if (tbl_count[s] == 1) begin     // correctable data error pattern
      expect_eq("corrected data", 32'(data_out), 32'(v));
      expect_eq("flipped bits", 32'(flip), 32'(e[15:0]));
      if (data_out == v) begin
        case ($countones(e))
          0: n_clean++;
          1: n_single++;
          default: n_double[region]++;
        endcase
      end
    end else begin
      if (err) n_ambiguous++;
    end
  endtask

  initial begin
    repeat (65536 * 33 + DOUBLE_WORDS * 120 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v, s;
    data_in = '0;
    channel_err = '0;
    for (int i = 0; i < 65536; i++) tbl_count[i] = 0;
    for (int k = 0; k < NUM_PATTERNS; k++) begin
      s = ref_red(ref_pattern(k));
      tbl_count[s]++;
      tbl_pat[s] = ref_pattern(k);
    end

    for (int w = 0; w < 65536; w++) begin
      send(16'(w), '0);
      for (int b = 0; b < 32; b++) send(16'(w), 32'(1) << b);
    end
    for (int n = 0; n < DOUBLE_WORDS; n++) begin
      v = 16'($urandom);
      for (int k = 17; k < NUM_PATTERNS; k++) send(v, {16'h0000, ref_pattern(k)});
    end

    $display("clean words            %0d", n_clean);
    $display("single errors fixed    %0d", n_single);
    $display("double errors fixed    region1=%0d region2=%0d region3=%0d", n_double[1],
             n_double[2], n_double[3]);
    $display("redundancy errors      %0d", n_red_err);
    $display("ambiguous doubles seen %0d", n_ambiguous);
    expect_eq("clean count", 32'(n_clean), 32'(65536));
    expect_eq("single count", 32'(n_single), 32'(65536 * 16));
    expect_eq("double total", 32'(n_double[1] + n_double[2] + n_double[3]),
              32'(DOUBLE_WORDS * 96));
    for (int r = 1; r <= 3; r++) begin
      checks++;
      if (n_double[r] == 0) begin
        failures++;
        $display("no double-error correction in region %0d", r);
      end
    end
    expect_eq("redundancy count", 32'(n_red_err), 32'(65536 * 16));
    expect_eq("ambiguous count", 32'(n_ambiguous), 32'(DOUBLE_WORDS * 24));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

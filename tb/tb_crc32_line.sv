// tb_crc32_line -- checks the one-clock CRC-32 of a 256-bit line against a
// reference written differently: the non-reflected, MSB-first form of the same
// code (generator 0x04C11DB7) applied to bit-reversed bytes, with the result
// bit-reversed. Checks the known CRC-32 of 32 zero bytes (0x190A55AD), a set
// of random lines, single-bit changes, and the one-clock latency.
module tb_crc32_line;
  import otp_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n, in_valid, out_valid;
  line_t  line;
  crc_t   crc;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  crc32_line dut (.clk, .rst_n, .in_valid, .line, .out_valid, .crc);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_crc(input line_t l);
    logic [31:0] c;
    logic [7:0]  b;
    c = 32'hFFFF_FFFF;
    for (int k = 0; k < LINE_BYTES; k++) begin
      b = l[8*k +: 8];
      c ^= {{b[0], b[1], b[2], b[3], b[4], b[5], b[6], b[7]}, 24'h0};
      for (int j = 0; j < 8; j++) c = c[31] ? ((c << 1) ^ 32'h04C1_1DB7) : (c << 1);
    end
    c = ~c;
    return {<<{c}};
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic apply(input line_t l, input logic [31:0] exp_crc);
    line     <= l;
    in_valid <= 1'b1;
    @(posedge clk);
    in_valid <= 1'b0;
    line     <= ~l;               // must not matter after the sampling edge
    #1;
    check("out_valid one clock after in_valid", out_valid);
    check($sformatf("crc %h expected %h", crc, exp_crc), crc == exp_crc);
    @(posedge clk);
    #1;
    check("out_valid is a single pulse", !out_valid);
  endtask

  initial begin
    line_t l;
    logic [31:0] c0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    line = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check("reference: CRC-32 of 32 zero bytes", ref_crc('0) == 32'h190A_55AD);
    apply('0, 32'h190A_55AD);
    for (int n = 0; n < 100; n++) begin
      for (int w = 0; w < LINE_WORDS; w++) l[32*w +: 32] = $urandom;
      apply(l, ref_crc(l));
      c0 = ref_crc(l);
      l[$urandom_range(LINE_W-1)] ^= 1'b1;
      check("single bit change alters the CRC", ref_crc(l) != c0);
      apply(l, ref_crc(l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

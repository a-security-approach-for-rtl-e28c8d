// tb_crc8_word -- checks the one-clock CRC-8 of a 32-bit word against a
// reference computed differently: the word's 32 message bits, followed by
// eight zero bits, are reduced modulo x^8 + x^2 + x + 1 by polynomial long
// division. Checks the CRC-8 check value of the ASCII bytes "1234" (0xC2, fed
// as byte 0 = '1'), random words, single-bit changes (always detected by a CRC)
// and the one-clock latency.
module tb_crc8_word;
  import otp_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n, in_valid, out_valid;
  word_t      word;
  logic [7:0] crc;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  crc8_word dut (.clk, .rst_n, .in_valid, .word, .out_valid, .crc);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // message polynomial: byte 0 first, each byte MSB first; times x^8, mod g
  function automatic logic [7:0] ref_crc(input word_t w);
    logic [39:0] m;
    for (int k = 0; k < 4; k++) m[39 - 8*k -: 8] = w[8*k +: 8];
    m[7:0] = 8'h00;
    for (int i = 39; i >= 8; i--)
      if (m[i]) m[i -: 9] = m[i -: 9] ^ 9'h107;
    return m[7:0];
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic apply(input word_t w, input logic [7:0] exp_crc);
    word     <= w;
    in_valid <= 1'b1;
    @(posedge clk);
    in_valid <= 1'b0;
    word     <= ~w;
    #1;
    check("out_valid one clock after in_valid", out_valid);
    check($sformatf("crc(%h) = %h, expected %h", w, crc, exp_crc), crc == exp_crc);
  endtask

  initial begin
    word_t w;
    rst_n = 1'b0;
    in_valid = 1'b0;
    word = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // "1234" = 0x31 0x32 0x33 0x34, byte 0 in the low bits
    check("reference: CRC-8 of \"1234\"", ref_crc(32'h3433_3231) == 8'hC2);
    apply(32'h3433_3231, 8'hC2);
    apply(32'h0, 8'h00);
    for (int n = 0; n < 300; n++) begin
      w = $urandom;
      apply(w, ref_crc(w));
      check("single bit change alters the CRC", ref_crc(w ^ (32'h1 << $urandom_range(31))) != ref_crc(w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// crc8_word -- one-clock CRC-8 of a single 32-bit word, the tag generator of
// the pipelined configuration.
//
// With one tag per 32-bit word instead of one per 256-bit line, a read can
// decrypt and check each word as it arrives from the SDRAM, instead of waiting
// for the whole line. Each tag is a quarter the width of a line tag, so the
// line's tags take 64 bits, twice the 32 of a line CRC-32. The cost of the
// short tag is a 2^-8 chance that a modified word passes its check.
//
// How it works: the word is taken as four bytes, byte k = word[8k +: 8],
// lowest byte first and each byte most significant bit first, and divided by
// the generator x^8 + x^2 + x + 1 (0x07) from an all-zero initial value with
// no final XOR (the common "CRC-8" / SMBus PEC). The generator and bit order
// are this design's choice; the 32-bit input, 8-bit output and one-clock
// latency follow the reference system.
//
// Timing: `crc`/`out_valid` appear the clock after `word`/`in_valid`.
module crc8_word
  import otp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  word_t      word,
  output logic       out_valid,
  output logic [7:0] crc
);

  localparam logic [7:0] POLY = 8'h07;

  logic [7:0] crc_next;

  always_comb begin
    logic [7:0] c;
    c = 8'h00;
    for (int k = 0; k < 4; k++)
      for (int i = 7; i >= 0; i--) begin
        if (c[7] ^ word[8*k + i]) c = {c[6:0], 1'b0} ^ POLY;
        else                      c = {c[6:0], 1'b0};
      end
    crc_next = c;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      crc       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) crc <= crc_next;
    end
  end

endmodule

// crc32_line -- one-clock CRC-32 over a whole 256-bit cache line.
//
// This is the integrity tag generator of the security core. On a write it
// tags the plaintext line before encryption; on a read it recomputes the tag
// of the decrypted line so that it can be compared with the stored one. Any
// change to the ciphertext in external memory (spoofing), a line moved to
// another address (relocation) or an old line put back (replay) decrypts to a
// different plaintext and, with probability 1 - 2^-32, a different tag.
//
// How it works: the whole line is folded bit by bit through the CRC in one
// combinational cone, and the result is registered. The line is taken as 32
// bytes, byte k = line[8k +: 8] (the order in which a little-endian 32-bit bus
// delivers them), each byte least significant bit first. The code is the
// common CRC-32 (generator 0x04C11DB7, reflected, initial value and final XOR
// 0xFFFFFFFF); the choice of generator and bit order is this design's own, the
// one-clock latency and the 256-bit input follow the reference system.
//
// Timing: `crc`/`out_valid` appear the clock after `line`/`in_valid`.
module crc32_line
  import otp_pkg::*;
#(
  parameter int unsigned LINE_BITS = LINE_W,
  parameter int unsigned CRC_BITS  = CRC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [LINE_BITS-1:0] line,
  output logic                 out_valid,
  output logic [CRC_BITS-1:0]  crc
);

  localparam logic [31:0] POLY_REFLECTED = 32'hEDB88320;

  initial begin
    assert (CRC_BITS == 32) else $error("crc32_line computes a 32-bit CRC");
    assert (LINE_BITS % 8 == 0) else $error("line must be whole bytes");
  end

  logic [31:0] crc_next;

  always_comb begin
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    for (int i = 0; i < int'(LINE_BITS); i++) begin
      if (c[0] ^ line[i]) c = (c >> 1) ^ POLY_REFLECTED;
      else                c = c >> 1;
    end
    crc_next = ~c;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      crc       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) crc <= CRC_BITS'(crc_next);
    end
  end

endmodule

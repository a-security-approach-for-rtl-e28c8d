// crc_memory -- on-chip integrity-tag store of the memory security core.
//
// Holds the CRC-32 of the plaintext of every cache line of the external
// memory, read-only code and read-write data alike. A write stores the tag of
// the new plaintext; a read fetches it, in parallel with the external fetch,
// for comparison with the tag of the decrypted line.
//
// The store sits in the trusted zone on chip, where the attacker cannot reach
// it. With the reference sizes (512 KB of external memory, 32-byte lines,
// 32-bit tags) it is 16384 x 32 bits = 64 KB. It is a single-port synchronous
// RAM: `rdata` shows the word at `addr` of the previous clock, and a write in
// the same clock returns the old word. The RAM organisation is this design's
// choice; it has no reset, and the controller clears it after reset so that a
// line never written reads back as failing its check.
module crc_memory
  import otp_pkg::*;
#(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned WIDTH = CRC_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    rdata <= mem[addr];
    if (we) mem[addr] <= wdata;
  end

endmodule

// ts_memory -- on-chip time-stamp store of the memory security core.
//
// Holds one time stamp per read-write cache line of the external memory. The
// time stamp is part of the AES input that generates a line's one-time pad, and
// it is incremented on every write of the line, so a pad is never reused and a
// line replayed from an earlier write no longer decrypts correctly. Read-only
// lines need no entry: their pad depends on the address alone.
//
// The store sits in the trusted zone on chip. With the reference sizes (256 KB
// of read-write data, 32-byte lines, 32-bit stamps) it is 8192 x 32 bits =
// 32 KB. It is a single-port synchronous RAM: `rdata` shows the word at `addr`
// of the previous clock, and a write in the same clock returns the old word
// (read-before-write). The RAM organisation is this design's choice; it has no
// reset, and the controller clears it after reset.
module ts_memory
  import otp_pkg::*;
#(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned WIDTH = TS_W,
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

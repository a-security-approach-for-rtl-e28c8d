// otp_pkg -- types, constants and AES helper functions shared by the
// off-chip memory security core (one-time-pad encryption with CRC integrity
// checking).
//
// The memory geometry follows the reference system: 512 KB of external memory
// on a 32-bit bus, 256-bit (32-byte) cache lines moved as eight 32-bit words,
// the lower half holding read-only code and the upper half read-write data.
// The AES functions implement FIPS-197 encryption. The S-box is not stored as
// a table of numbers: it is computed at elaboration as the multiplicative
// inverse in GF(2^8) (polynomial x^8+x^4+x^3+x+1) followed by the affine map
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63, so the ROM that
// synthesis builds from SBOX needs no data file.
package otp_pkg;

  // ---- memory geometry ---------------------------------------------------
  localparam int unsigned WORD_W      = 32;          // cache and SDRAM bus width
  localparam int unsigned LINE_W      = 256;         // cache line width
  localparam int unsigned LINE_WORDS  = LINE_W / WORD_W;  // 8 words per line
  localparam int unsigned LINE_BYTES  = LINE_W / 8;  // 32 bytes per line
  localparam int unsigned BLOCK_W     = 128;         // AES block width
  localparam int unsigned TS_W        = 32;          // time stamp width
  localparam int unsigned CRC_W       = 32;          // integrity tag width

  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [LINE_W-1:0]  line_t;
  typedef logic [BLOCK_W-1:0] block_t;
  typedef logic [TS_W-1:0]    ts_t;
  typedef logic [CRC_W-1:0]   crc_t;

  // ---- GF(2^8) arithmetic used by AES -----------------------------------
  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] affine(input logic [7:0] inv);
    return inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]}
           ^ {inv[3:0], inv[7:4]} ^ 8'h63;
  endfunction

  typedef logic [7:0] sbox_t [256];

  // Inverses come from power tables of the generator 0x03:
  // exp[i] = 3^i, log[exp[i]] = i, inv(b) = exp[(255 - log[b]) mod 255].
  function automatic sbox_t sbox_table();
    sbox_t t;
    logic [7:0] pow [256];
    logic [7:0] lg  [256];
    logic [7:0] p;
    p = 8'h01;
    for (int i = 0; i < 256; i++) lg[i] = '0;
    for (int i = 0; i < 255; i++) begin
      pow[i] = p;
      lg[p]  = 8'(i);
      p      = p ^ xtime(p);
    end
    pow[255] = 8'h01;
    t[0] = affine(8'h00);
    for (int i = 1; i < 256; i++) t[i] = affine(pow[(255 - int'(lg[i])) % 255]);
    return t;
  endfunction

  localparam sbox_t SBOX = sbox_table();

endpackage

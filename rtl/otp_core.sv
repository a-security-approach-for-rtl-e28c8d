// otp_core -- off-chip memory security core: one-time-pad encryption with
// CRC integrity checking. The defaults build the "OTP128 + CRC32"
// configuration; NUM_AES = 2 gives "OTP256" and CRC8_PIPELINED = 1 the
// pipelined per-word CRC-8 version (see otp_control).
//
// Placed between a processor's caches and its SDRAM controller, it keeps every
// cache line in external memory encrypted and detects spoofed, relocated and
// replayed lines. The pad for a line is AES-128 of {time stamp, line address,
// padding} under a key that never leaves the chip, so it can be computed while
// the SDRAM is still fetching the line: on a read only XOR, CRC and compare are
// added behind the fetch. The per-line time stamps and CRC tags are kept in
// on-chip RAM, in the trusted zone.
//
// Blocks: otp_control (sequencing, XOR, compare), aes128_encrypt (pad
// generator, NUM_AES copies), crc32_line or crc8_word (tag generator),
// ts_memory (time stamps of the read-write lines) and crc_memory (tags of all
// lines). With the defaults, 512 KB of external memory of which the lower
// 256 KB is read-only code, the stores hold 32 KB of stamps and 64 KB of tags
// (96 KB of on-chip memory; 160 KB with CRC8_PIPELINED, whose tags are
// 64 bits per line).
//
// Interface and timing: see otp_control. After reset the core clears its
// stores for MEM_BYTES/32 clocks with cache_req_ready low. A line write
// sends its first ciphertext word 12 clocks after the request; a line read
// delivers its first plaintext word 11 clocks after the first ciphertext word
// arrives from SDRAM (3 clocks with CRC8_PIPELINED), provided the pad (ready
// 12 clocks after the request) is not later than the data.
module otp_core
  import otp_pkg::*;
#(
  parameter int unsigned  MEM_BYTES = 512 * 1024,
  parameter int unsigned  RO_BYTES  = 256 * 1024,
  parameter logic [63:0]  PAD_VALUE = 64'h0,
  parameter int unsigned  NUM_AES   = 1,
  parameter bit           CRC8_PIPELINED = 1'b0,
  localparam int unsigned ADDR_W    = $clog2(MEM_BYTES),
  localparam int unsigned LINES     = MEM_BYTES / LINE_BYTES,
  localparam int unsigned RW_LINES  = (MEM_BYTES - RO_BYTES) / LINE_BYTES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  block_t            aes_key,          // secret key, from the trusted zone
  // cache side
  input  logic              cache_req_valid,
  output logic              cache_req_ready,
  input  logic              cache_req_we,
  input  logic [ADDR_W-1:0] cache_req_addr,
  input  word_t             cache_wdata,
  input  logic              cache_wvalid,
  output logic              cache_wdone,
  output logic              cache_rvalid,
  output word_t             cache_rdata,
  output logic              cache_rerr,
  output logic              integrity_alarm,
  // SDRAM controller side
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output logic [ADDR_W-1:0] mem_req_addr,
  output word_t             mem_wdata,
  output logic              mem_wvalid,
  input  logic              mem_rvalid,
  input  word_t             mem_rdata
);

  localparam int unsigned LINE_AW = $clog2(LINES);
  localparam int unsigned RW_AW   = $clog2(RW_LINES);
  localparam int unsigned CRC_OUT_W = CRC8_PIPELINED ? 8 : 32;
  localparam int unsigned TAG_W     = CRC8_PIPELINED ? 8 * LINE_WORDS : 32;

  logic                            aes_start;
  logic [NUM_AES-1:0]              aes_busy, aes_ct_valid;
  logic [NUM_AES-1:0][BLOCK_W-1:0] aes_pt, aes_ct;
  logic               crc_in_valid, crc_out_valid;
  line_t              crc_line;
  logic [CRC_OUT_W-1:0] crc_value;
  logic [RW_AW-1:0]   ts_addr;
  logic               ts_we;
  ts_t                ts_wdata, ts_rdata;
  logic [LINE_AW-1:0] cm_addr;
  logic               cm_we;
  logic [TAG_W-1:0]   cm_wdata, cm_rdata;

  otp_control #(
    .MEM_BYTES (MEM_BYTES),
    .RO_BYTES  (RO_BYTES),
    .PAD_VALUE (PAD_VALUE),
    .NUM_AES   (NUM_AES),
    .CRC8_PIPELINED (CRC8_PIPELINED)
  ) u_ctrl (
    .clk, .rst_n,
    .cache_req_valid, .cache_req_ready, .cache_req_we, .cache_req_addr,
    .cache_wdata, .cache_wvalid, .cache_wdone,
    .cache_rvalid, .cache_rdata, .cache_rerr, .integrity_alarm,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr,
    .mem_wdata, .mem_wvalid, .mem_rvalid, .mem_rdata,
    .aes_start, .aes_pt, .aes_ct_valid, .aes_ct,
    .crc_in_valid, .crc_line, .crc_out_valid, .crc_value,
    .ts_addr, .ts_we, .ts_wdata, .ts_rdata,
    .cm_addr, .cm_we, .cm_wdata, .cm_rdata
  );

  // all pad generators start together on the same time stamp
  for (genvar j = 0; j < int'(NUM_AES); j++) begin : g_aes
    aes128_encrypt u_aes (
      .clk, .rst_n,
      .key      (aes_key),
      .start    (aes_start),
      .pt       (aes_pt[j]),
      .busy     (aes_busy[j]),
      .ct_valid (aes_ct_valid[j]),
      .ct       (aes_ct[j])
    );
  end

  if (CRC8_PIPELINED) begin : g_crc8
    crc8_word u_crc (
      .clk, .rst_n,
      .in_valid  (crc_in_valid),
      .word      (crc_line[WORD_W-1:0]),
      .out_valid (crc_out_valid),
      .crc       (crc_value)
    );
  end else begin : g_crc32
    crc32_line u_crc (
      .clk, .rst_n,
      .in_valid  (crc_in_valid),
      .line      (crc_line),
      .out_valid (crc_out_valid),
      .crc       (crc_value)
    );
  end

  ts_memory #(.DEPTH(RW_LINES)) u_ts_mem (
    .clk,
    .addr  (ts_addr),
    .we    (ts_we),
    .wdata (ts_wdata),
    .rdata (ts_rdata)
  );

  crc_memory #(.DEPTH(LINES), .WIDTH(TAG_W)) u_crc_mem (
    .clk,
    .addr  (cm_addr),
    .we    (cm_we),
    .wdata (cm_wdata),
    .rdata (cm_rdata)
  );

  // the pad generator is only restarted once a line is finished
  assert property (@(posedge clk) disable iff (!rst_n) aes_start |-> aes_busy == '0)
    else $error("pad generator restarted while busy");

endmodule

// otp_control -- sequencer of the one-time-pad (OTP) memory security core.
//
// Sits between the processor caches and the SDRAM controller and makes every
// cache line that leaves the chip ciphertext with an on-chip integrity tag:
//
//   line write (from cache)               line read (to cache)
//   1 tag = CRC(plaintext)                1 fetch TS(line) from ts_memory
//   2 TS(line) = TS(line) + 1             2 fetch tag from crc_memory
//   3 pad = AES_K{TS, address, padding}   3 pad = AES_K{TS, address, padding}
//   4 ciphertext = plaintext ^ pad        4 fetch ciphertext from SDRAM
//   5 ciphertext -> SDRAM                   (3 and 4 overlap)
//   6 TS(line) -> ts_memory               5 plaintext = ciphertext ^ pad
//   7 tag -> crc_memory                   6 check CRC(plaintext) == tag
//                                         7 plaintext -> cache, with error flag
//
// The address in the AES input defeats relocation, the time stamp (TS)
// defeats replay, and the CRC detects any change to the stored ciphertext.
// Read-only lines (byte addresses below RO_BYTES) have no time stamp: their
// pad uses TS = 0.
//
// Two options select the configurations of the reference system:
//   NUM_AES = 1 (default, "OTP128"): one 128-bit pad covers the 256-bit line
//     twice; word k of the line is XORed with pad bits [32*(k mod 4) +: 32].
//   NUM_AES = 2 ("OTP256"): two AES cores run in parallel on the same time
//     stamp, core j on the address of the line's j-th 16-byte half, so no pad
//     bits repeat; word k uses bits [32*(k mod 4) +: 32] of core k/4's pad.
//   CRC8_PIPELINED = 0 (default): one CRC-32 per line; a read is checked once
//     the whole line is in.
//   CRC8_PIPELINED = 1: one CRC-8 per 32-bit word (64 bits of tag per line);
//     each word of a read is decrypted and checked as it arrives and reaches
//     the cache 3 clocks after its SDRAM word, with its own error flag.
//
// Cache port: a request is taken when cache_req_valid && cache_req_ready. For
// a write, the first 32-bit word of the line comes with the request in
// cache_wdata and the other seven follow, in order, each marked by cache_wvalid
// (the low five address bits, the byte inside the line, are not used);
// cache_wdone pulses once the line is in SDRAM. A read returns eight words, in
// order, with cache_rvalid (on eight consecutive clocks with the line CRC;
// following the SDRAM beats with per-word CRCs). cache_rerr marks a word
// whose check failed (with the line CRC, all eight), and integrity_alarm
// pulses with the first such word of a line.
// SDRAM port: the same conventions, with mem_req_* / mem_wdata / mem_wvalid for
// writes and eight mem_rvalid beats for reads; a line is addressed by its
// 32-byte-aligned byte address.
//
// Timing: the pad generator starts the clock after a request is taken (once
// the time stamp has been read) and is ready 11 clocks later. A write sends its
// first ciphertext word 12 clocks after the request (AES plus XOR). A read
// starts the SDRAM fetch at the same time as AES, so the pad is normally ready
// before the data; the first plaintext word reaches the cache 11 clocks after
// the first ciphertext word arrives: 7 more words, then XOR, CRC and compare,
// one clock each. These numbers, the algorithms and the sizes follow the
// reference system; the port handshakes, the clear-after-reset sweep
// (LINES clocks with cache_req_ready low) and the treatment of writes to
// read-only lines (accepted with TS = 0, for loading code) are this design's
// choices. The 32-bit time stamps wrap silently after 2^32 writes to one line.
module otp_control
  import otp_pkg::*;
#(
  parameter int unsigned    MEM_BYTES = 512 * 1024,  // external memory size
  parameter int unsigned    RO_BYTES  = 256 * 1024,  // read-only (code) region at the bottom
  parameter logic [63:0]    PAD_VALUE = 64'h0,       // padding of the AES input block
  parameter int unsigned    NUM_AES   = 1,           // 1: OTP128, 2: OTP256
  parameter bit             CRC8_PIPELINED = 1'b0,   // per-word CRC-8 instead of line CRC-32
  localparam int unsigned   CRC_OUT_W = CRC8_PIPELINED ? 8 : 32,
  localparam int unsigned   TAG_W     = CRC8_PIPELINED ? 8 * LINE_WORDS : 32,
  localparam int unsigned   ADDR_W    = $clog2(MEM_BYTES),
  localparam int unsigned   LINES     = MEM_BYTES / LINE_BYTES,
  localparam int unsigned   RW_LINES  = (MEM_BYTES - RO_BYTES) / LINE_BYTES,
  localparam int unsigned   RO_LINES  = RO_BYTES / LINE_BYTES,
  localparam int unsigned   LINE_AW   = $clog2(LINES),
  localparam int unsigned   RW_AW     = $clog2(RW_LINES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // cache side
  input  logic               cache_req_valid,
  output logic               cache_req_ready,
  input  logic               cache_req_we,
  input  logic [ADDR_W-1:0]  cache_req_addr,
  input  word_t              cache_wdata,
  input  logic               cache_wvalid,
  output logic               cache_wdone,
  output logic               cache_rvalid,
  output word_t              cache_rdata,
  output logic               cache_rerr,
  output logic               integrity_alarm,
  // SDRAM controller side
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic               mem_req_we,
  output logic [ADDR_W-1:0]  mem_req_addr,
  output word_t              mem_wdata,
  output logic               mem_wvalid,
  input  logic               mem_rvalid,
  input  word_t              mem_rdata,
  // pad generator (AES-128)
  output logic                             aes_start,
  output logic [NUM_AES-1:0][BLOCK_W-1:0]  aes_pt,
  input  logic [NUM_AES-1:0]               aes_ct_valid,
  input  logic [NUM_AES-1:0][BLOCK_W-1:0]  aes_ct,
  // tag generator (CRC-32 of a line, or CRC-8 of crc_line[31:0])
  output logic               crc_in_valid,
  output line_t              crc_line,
  input  logic               crc_out_valid,
  input  logic [CRC_OUT_W-1:0] crc_value,
  // time-stamp store
  output logic [RW_AW-1:0]   ts_addr,
  output logic               ts_we,
  output ts_t                ts_wdata,
  input  ts_t                ts_rdata,
  // tag store
  output logic [LINE_AW-1:0] cm_addr,
  output logic               cm_we,
  output logic [TAG_W-1:0]   cm_wdata,
  input  logic [TAG_W-1:0]   cm_rdata
);

  typedef enum logic [2:0] {
    S_INIT, S_IDLE, S_WRITE, S_READ, S_XOR, S_CRC, S_CHECK, S_RESP
  } state_e;

  typedef logic [LINE_AW-1:0] line_idx_t;

  state_e       state_q;
  line_idx_t    line_q;          // line being processed
  logic         rw_q;            // line lies in the read-write region
  logic         first_q;         // first clock after the request: TS/tag valid
  word_t        buf_q [LINE_WORDS];
  logic [3:0]   cnt_q;           // words of the line received
  logic [3:0]   send_q;          // write beats sent to SDRAM
  logic         memreq_done_q;   // read request accepted by SDRAM
  logic         crc_started_q, crc_stored_q;
  logic [TAG_W-1:0] crc_exp_q;   // stored tag of the line being read
  logic         err_q;
  logic [2:0]   out_q;
  line_idx_t    init_q;
  logic         alarm_done_q;    // alarm already raised for this line
  // per-word tags (CRC8_PIPELINED)
  logic [TAG_W-1:0] tag_q;       // tags of the words written so far
  logic [3:0]   tcnt_q;          // number of word tags collected
  logic [3:0]   p_q;             // next word to decrypt
  logic         x_valid_q, y_valid_q, o_valid_q, o_err_q;
  word_t        x_word_q, y_word_q, o_word_q;
  logic [2:0]   x_idx_q, y_idx_q, o_idx_q;
  logic         can_x;
  word_t        x_in;
  logic         rvalid, rerr;
  logic [8*LINE_WORDS-1:0] exp_tags;

  assign exp_tags = (8*LINE_WORDS)'(crc_exp_q);

  line_idx_t req_line;
  logic      pad_ready;
  logic      last_beat;
  line_t     line_flat;

  function automatic logic is_rw(input line_idx_t l);
    return l >= line_idx_t'(RO_LINES);
  endfunction

  function automatic logic [RW_AW-1:0] rw_index(input line_idx_t l);
    return RW_AW'(l - line_idx_t'(RO_LINES));
  endfunction

  // pad bits for word k of the line
  function automatic word_t pad_word(input logic [NUM_AES-1:0][BLOCK_W-1:0] pad,
                                     input int unsigned k);
    return pad[(k / 4) % NUM_AES][32*(k % 4) +: 32];
  endfunction

  assign req_line  = cache_req_addr[ADDR_W-1 -: LINE_AW];
  // ct_valid is stale in the clock the pad generator is started
  assign pad_ready = (&aes_ct_valid) && !first_q;
  assign last_beat = (state_q == S_READ) && memreq_done_q && mem_rvalid && cnt_q == 4'd7;

  always_comb
    for (int k = 0; k < LINE_WORDS; k++) line_flat[32*k +: 32] = buf_q[k];

  // ---- pad generator and tag generator inputs --------------------------------
  ts_t ts_used;
  always_comb begin
    if (!rw_q)                   ts_used = '0;
    else if (state_q == S_WRITE) ts_used = ts_rdata + 1'b1;
    else                         ts_used = ts_rdata;
  end

  assign aes_start = first_q;
  always_comb
    for (int j = 0; j < int'(NUM_AES); j++)
      aes_pt[j] = {ts_used, 32'({line_q, 5'b0}) + 32'(16 * j), PAD_VALUE};

  // word entering the XOR stage of a pipelined read: from the buffer, or
  // straight from the SDRAM if it arrives this clock
  assign x_in  = (p_q < cnt_q) ? buf_q[p_q[2:0]] : mem_rdata;
  assign can_x = (state_q == S_READ) && pad_ready && p_q < 4'd8 &&
                 (p_q < cnt_q || (p_q == cnt_q && memreq_done_q && mem_rvalid));

  always_comb begin
    if (CRC8_PIPELINED) begin
      crc_line = '0;
      unique case (state_q)
        S_IDLE:  begin
          crc_line[31:0] = cache_wdata;
          crc_in_valid   = cache_req_valid && cache_req_we;
        end
        S_WRITE: begin
          crc_line[31:0] = cache_wdata;
          crc_in_valid   = cache_wvalid && cnt_q < 4'd8;
        end
        default: begin
          crc_line[31:0] = x_word_q;
          crc_in_valid   = (state_q == S_READ) && x_valid_q;
        end
      endcase
    end else begin
      crc_line     = line_flat;
      crc_in_valid = (state_q == S_CRC) ||
                     (state_q == S_WRITE && cnt_q == 4'd8 && !crc_started_q);
    end
  end

  // ---- on-chip stores --------------------------------------------------------
  always_comb begin
    ts_addr  = rw_index(line_q);
    ts_we    = 1'b0;
    ts_wdata = ts_used;
    cm_addr  = line_q;
    cm_we    = 1'b0;
    cm_wdata = CRC8_PIPELINED ? tag_q : TAG_W'(crc_value);
    unique case (state_q)
      S_INIT: begin
        ts_addr  = RW_AW'(init_q);
        ts_we    = init_q < line_idx_t'(RW_LINES);
        ts_wdata = '0;
        cm_addr  = init_q;
        cm_we    = 1'b1;
        cm_wdata = '0;
      end
      S_IDLE: begin
        ts_addr = rw_index(req_line);
        cm_addr = req_line;
      end
      S_WRITE: begin
        ts_we = first_q && rw_q;      // store the incremented stamp
        // store the tag of the new plaintext
        cm_we = CRC8_PIPELINED ? (tcnt_q == 4'd8 && !crc_stored_q) : crc_out_valid;
      end
      default: ;
    endcase
  end

  // ---- SDRAM port ------------------------------------------------------------
  always_comb begin
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = {line_q, 5'b0};
    mem_wvalid    = 1'b0;
    mem_wdata     = buf_q[send_q[2:0]] ^ pad_word(aes_ct, 32'(send_q[2:0]));
    if (state_q == S_WRITE && pad_ready) begin
      if (send_q == 4'd0) begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
      end else if (send_q < 4'd8 && send_q < cnt_q) begin
        mem_wvalid = 1'b1;
      end
    end
    if (state_q == S_READ && !memreq_done_q) mem_req_valid = 1'b1;
  end

  // ---- cache port ------------------------------------------------------------
  assign cache_req_ready = (state_q == S_IDLE);
  assign rvalid          = CRC8_PIPELINED ? o_valid_q : (state_q == S_RESP);
  assign rerr            = CRC8_PIPELINED ? o_err_q : err_q;
  assign cache_rvalid    = rvalid;
  assign cache_rdata     = CRC8_PIPELINED ? o_word_q : buf_q[out_q];
  assign cache_rerr      = rerr;
  assign integrity_alarm = rvalid && rerr && !alarm_done_q;
  assign cache_wdone     = (state_q == S_WRITE) && send_q == 4'd8 && crc_stored_q;

  // ---- sequencing ------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q       <= S_INIT;
      init_q        <= '0;
      line_q        <= '0;
      rw_q          <= 1'b0;
      first_q       <= 1'b0;
      cnt_q         <= '0;
      send_q        <= '0;
      memreq_done_q <= 1'b0;
      crc_started_q <= 1'b0;
      crc_stored_q  <= 1'b0;
      crc_exp_q     <= '0;
      err_q         <= 1'b0;
      out_q         <= '0;
      alarm_done_q  <= 1'b0;
      tag_q         <= '0;
      tcnt_q        <= '0;
      p_q           <= '0;
      x_valid_q     <= 1'b0;
      y_valid_q     <= 1'b0;
      o_valid_q     <= 1'b0;
      o_err_q       <= 1'b0;
      x_word_q      <= '0;
      y_word_q      <= '0;
      o_word_q      <= '0;
      x_idx_q       <= '0;
      y_idx_q       <= '0;
      o_idx_q       <= '0;
      for (int k = 0; k < LINE_WORDS; k++) buf_q[k] <= '0;
    end else begin
      first_q <= 1'b0;
      if (integrity_alarm) alarm_done_q <= 1'b1;
      // per-word read pipeline: XOR (x), CRC-8 (y), compare (o)
      x_valid_q <= can_x;
      x_word_q  <= x_in ^ pad_word(aes_ct, 32'(p_q[2:0]));
      x_idx_q   <= p_q[2:0];
      if (can_x) p_q <= p_q + 4'd1;
      y_valid_q <= x_valid_q && state_q == S_READ;
      y_word_q  <= x_word_q;
      y_idx_q   <= x_idx_q;
      o_valid_q <= CRC8_PIPELINED && y_valid_q && crc_out_valid;
      o_word_q  <= y_word_q;
      o_idx_q   <= y_idx_q;
      o_err_q   <= 8'(crc_value) != exp_tags[8*y_idx_q +: 8];
      unique case (state_q)
        S_INIT: begin
          init_q <= init_q + 1'b1;
          if (init_q == line_idx_t'(LINES - 1)) state_q <= S_IDLE;
        end

        S_IDLE: if (cache_req_valid) begin
          line_q        <= req_line;
          rw_q          <= is_rw(req_line);
          first_q       <= 1'b1;
          send_q        <= '0;
          memreq_done_q <= 1'b0;
          crc_started_q <= 1'b0;
          crc_stored_q  <= 1'b0;
          err_q         <= 1'b0;
          alarm_done_q  <= 1'b0;
          tcnt_q        <= '0;
          p_q           <= '0;
          if (cache_req_we) begin
            buf_q[0] <= cache_wdata;
            cnt_q    <= 4'd1;
            state_q  <= S_WRITE;
          end else begin
            cnt_q    <= 4'd0;
            state_q  <= S_READ;
          end
        end

        S_WRITE: begin
          if (cache_wvalid && cnt_q < 4'd8) begin
            buf_q[cnt_q[2:0]] <= cache_wdata;
            cnt_q             <= cnt_q + 4'd1;
          end
          if (crc_in_valid) crc_started_q <= 1'b1;
          if (cm_we)        crc_stored_q  <= 1'b1;
          if (CRC8_PIPELINED && crc_out_valid && tcnt_q < 4'd8) begin
            tag_q[8*tcnt_q[2:0] +: 8] <= 8'(crc_value);
            tcnt_q                    <= tcnt_q + 4'd1;
          end
          if ((mem_req_valid && mem_req_ready) || mem_wvalid) send_q <= send_q + 4'd1;
          if (cache_wdone) state_q <= S_IDLE;
        end

        S_READ: begin
          if (first_q) crc_exp_q <= cm_rdata;
          if (mem_req_valid && mem_req_ready) memreq_done_q <= 1'b1;
          if (memreq_done_q && mem_rvalid && cnt_q < 4'd8) begin
            buf_q[cnt_q[2:0]] <= mem_rdata;
            cnt_q             <= cnt_q + 4'd1;
          end
          if (CRC8_PIPELINED) begin
            if (o_valid_q && o_idx_q == 3'(LINE_WORDS - 1)) state_q <= S_IDLE;
          end else if (pad_ready && (cnt_q == 4'd8 || last_beat)) begin
            state_q <= S_XOR;
          end
        end

        S_XOR: begin
          for (int k = 0; k < LINE_WORDS; k++) buf_q[k] <= buf_q[k] ^ pad_word(aes_ct, k);
          state_q <= S_CRC;
        end

        S_CRC: state_q <= S_CHECK;

        S_CHECK: begin
          err_q   <= (TAG_W'(crc_value) != crc_exp_q);
          out_q   <= '0;
          state_q <= S_RESP;
        end

        S_RESP: begin
          out_q <= out_q + 1'b1;
          if (out_q == 3'(LINE_WORDS - 1)) state_q <= S_IDLE;
        end

        default: state_q <= S_IDLE;
      endcase
    end
  end

  // ---- protocol rules ----------------------------------------------------------
  // write beats only belong to a write in progress
  assert property (@(posedge clk) disable iff (!rst_n)
                   cache_wvalid |-> (state_q == S_WRITE && cnt_q < 4'd8))
    else $error("cache_wvalid outside a line write");
  // SDRAM read beats only after a read request was accepted
  assert property (@(posedge clk) disable iff (!rst_n)
                   mem_rvalid |-> (state_q == S_READ && memreq_done_q && cnt_q < 4'd8))
    else $error("mem_rvalid outside a line read");
  // the tag unit answers one clock after it is asked
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state_q == S_CHECK) |-> crc_out_valid)
    else $error("CRC result missing in the check clock");

  initial begin
    assert (MEM_BYTES % LINE_BYTES == 0 && RO_BYTES % LINE_BYTES == 0 && RO_BYTES < MEM_BYTES)
      else $error("memory regions must be whole lines and leave a read-write region");
    assert ((1 << ADDR_W) == MEM_BYTES && (1 << RW_AW) == RW_LINES)
      else $error("memory and read-write region sizes must be powers of two");
    assert (NUM_AES == 1 || NUM_AES == 2) else $error("NUM_AES must be 1 or 2");
  end

endmodule

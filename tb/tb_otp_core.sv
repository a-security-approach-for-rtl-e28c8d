// tb_otp_core -- end-to-end test of the memory security core at its full
// default size (512 KB external memory, 256 KB read-only, 32 KB of time stamps,
// 64 KB of tags), between a scripted cache and a behavioural SDRAM.
//
// The expected ciphertext of every checked line is rebuilt from a separate
// AES-128 instance fed {time stamp, line address, padding} as the testbench
// expects them; that core is itself checked against the FIPS-197 vectors.
// The test covers, and counts:
//   - the clear sweep after reset (16384 clocks)
//   - line writes to read-write lines (time stamp incremented) and to
//     read-only lines (time stamp 0), first and last line of the memory
//   - ciphertext = plaintext ^ {pad, pad}, and a fresh pad on every rewrite
//   - clean reads returning the plaintext, with the latencies of the reference
//     system: 12 clocks to the first ciphertext word of a write, 11 clocks from
//     the first SDRAM word to the first plaintext word of a read
//   - reads where the SDRAM is faster than the pad generator (data waits for
//     the pad) and where it is slower (pad waits for the data)
//   - spoofing, relocation and replay attacks on the SDRAM contents, each of
//     which must raise the integrity error
//   - a random mix of writes, reads and attacks against a scoreboard
// A mechanism that never happened counts as a failure.
module tb_otp_core;
  import otp_pkg::*;

  localparam int unsigned MEM_BYTES = 512 * 1024;
  localparam int unsigned LINES     = MEM_BYTES / 32;
  localparam int unsigned RO_LINES  = LINES / 2;
  localparam int unsigned ADDR_W    = 19;
  localparam block_t      KEY       = 128'h2b7e151628aed2a6abf7158809cf4f3c;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  block_t            aes_key = KEY;
  logic              cache_req_valid, cache_req_ready, cache_req_we, cache_wvalid;
  logic [ADDR_W-1:0] cache_req_addr;
  word_t             cache_wdata, cache_rdata;
  logic              cache_wdone, cache_rvalid, cache_rerr, integrity_alarm;
  logic              mem_req_valid, mem_req_ready, mem_req_we, mem_wvalid, mem_rvalid;
  logic [ADDR_W-1:0] mem_req_addr;
  word_t             mem_wdata, mem_rdata;

  otp_core dut (.*);
  sdram_model #(.MEM_BYTES(MEM_BYTES)) u_mem (.*);

  // reference pad generator
  logic   ref_start, ref_busy, ref_valid;
  block_t ref_pt, ref_ct;
  aes128_encrypt u_ref (.clk, .rst_n, .key(KEY), .start(ref_start), .pt(ref_pt),
                        .busy(ref_busy), .ct_valid(ref_valid), .ct(ref_ct));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_rw_write = 0, n_ro_write = 0, n_clean_read = 0, n_pad_wait = 0, n_data_wait = 0;
  int n_spoof = 0, n_reloc = 0, n_replay = 0, n_unwritten = 0, n_fresh_pad = 0;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%0d]: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  ts_t   sb_ts   [LINES];      // expected time stamp per line
  logic  sb_ok   [LINES];      // line holds an untampered, written value
  word_t sb_data [LINES][8];   // expected plaintext

  task automatic ref_pad(input ts_t ts, input int line, output block_t pad);
    ref_pt    <= {ts, 32'(line * 32), 64'h0};
    ref_start <= 1'b1;
    tick();
    ref_start <= 1'b0;
    while (!ref_valid) tick();
    pad = ref_ct;
  endtask

  task automatic write_line(input int line, input word_t data [8]);
    int t_req, t_mem;
    block_t pad;
    while (!cache_req_ready) tick();
    cache_req_valid <= 1'b1;
    cache_req_we    <= 1'b1;
    cache_req_addr  <= ADDR_W'(line * 32);
    cache_wdata     <= data[0];
    t_req = cyc;
    tick();
    cache_req_valid <= 1'b0;
    t_mem = -1;
    for (int k = 1; k < 8; k++) begin
      cache_wvalid <= 1'b1;
      cache_wdata  <= data[k];
      if (mem_req_valid && mem_req_ready && t_mem < 0) t_mem = cyc;
      tick();
    end
    cache_wvalid <= 1'b0;
    while (!cache_wdone) begin
      if (mem_req_valid && mem_req_ready && t_mem < 0) t_mem = cyc;
      tick();
    end
    tick();
    check($sformatf("write latency %0d, expected 12", t_mem - t_req), t_mem - t_req == 12);
    if (line >= int'(RO_LINES)) begin
      sb_ts[line] = sb_ts[line] + 1;
      n_rw_write++;
    end else begin
      n_ro_write++;
    end
    sb_ok[line] = 1'b1;
    for (int k = 0; k < 8; k++) sb_data[line][k] = data[k];
    ref_pad(sb_ts[line], line, pad);
    for (int k = 0; k < 8; k++)
      check($sformatf("line %0d word %0d ciphertext", line, k),
            u_mem.words[line * 8 + k] == (data[k] ^ pad[32*(k % 4) +: 32]));
  endtask

  // returns the clocks from request to first plaintext word
  task automatic read_line(input int line, input logic exp_err, output int lat_req);
    int t_req, t_data, k;
    logic alarm_seen;
    while (!cache_req_ready) tick();
    cache_req_valid <= 1'b1;
    cache_req_we    <= 1'b0;
    cache_req_addr  <= ADDR_W'(line * 32 + 8 * (line % 4));
    t_req = cyc;
    tick();
    cache_req_valid <= 1'b0;
    t_data = -1;
    while (!cache_rvalid) begin
      if (mem_rvalid && t_data < 0) t_data = cyc;
      tick();
    end
    lat_req = cyc - t_req;
    // the pad is ready 12 clocks after the request; the last SDRAM word
    // arrives t_data + 7: whichever is later sets the response time
    if (t_data + 7 < t_req + 12) begin
      n_pad_wait++;
      check($sformatf("pad-bound read latency %0d, expected 16", lat_req), lat_req == 16);
    end else begin
      n_data_wait++;
      check($sformatf("data-bound read latency %0d, expected 11 after data", cyc - t_data),
            cyc - t_data == 11);
    end
    k = 0;
    alarm_seen = 1'b0;
    while (cache_rvalid) begin
      if (integrity_alarm) alarm_seen = 1'b1;
      check($sformatf("line %0d error flag %0b, expected %0b", line, cache_rerr, exp_err),
            cache_rerr == exp_err);
      if (!exp_err) check($sformatf("line %0d word %0d plaintext", line, k),
                          cache_rdata == sb_data[line][k]);
      k++;
      tick();
    end
    check("eight response beats", k == 8);
    check("alarm pulse matches the error flag", alarm_seen == exp_err);
    if (!exp_err) n_clean_read++;
  endtask

  task automatic random_line(output word_t d [8]);
    for (int k = 0; k < 8; k++) d[k] = $urandom;
  endtask

  task automatic spoof(input int line);
    int w;
    w = $urandom_range(7);
    u_mem.words[line * 8 + w] = u_mem.words[line * 8 + w] ^ (32'h1 << $urandom_range(31));
    sb_ok[line] = 1'b0;
  endtask

  task automatic relocate(input int from, input int to);
    for (int k = 0; k < 8; k++) u_mem.words[to * 8 + k] = u_mem.words[from * 8 + k];
    sb_ok[to] = 1'b0;
  endtask

  initial begin
    word_t d [8], old [8];
    int lr, t0, line, line2, op;
    ref_start       = 1'b0;
    ref_pt          = '0;
    rst_n           = 1'b0;
    cache_req_valid = 1'b0;
    cache_req_we    = 1'b0;
    cache_req_addr  = '0;
    cache_wdata     = '0;
    cache_wvalid    = 1'b0;
    for (int i = 0; i < int'(LINES); i++) begin
      sb_ts[i] = '0;
      sb_ok[i] = 1'b0;
    end
    repeat (3) tick();
    rst_n <= 1'b1;
    t0 = cyc;
    while (!cache_req_ready) tick();
    check($sformatf("clear sweep %0d clocks, expected %0d", cyc - t0, LINES), cyc - t0 == int'(LINES));

    // the reference core answers the FIPS-197 Appendix B vector
    ref_pt    <= 128'h3243f6a8885a308d313198a2e0370734;
    ref_start <= 1'b1;
    tick();
    ref_start <= 1'b0;
    while (!ref_valid) tick();
    check("reference AES", ref_ct == 128'h3925841d02dc09fbdc118597196a0b32);

    // directed: first and last line, read-only and read-write
    random_line(d); write_line(0, d);
    random_line(d); write_line(LINES - 1, d);
    random_line(d); write_line(RO_LINES, d);
    random_line(d); write_line(RO_LINES - 1, d);
    read_line(0, 1'b0, lr);
    read_line(LINES - 1, 1'b0, lr);
    read_line(RO_LINES, 1'b0, lr);
    read_line(RO_LINES - 1, 1'b0, lr);

    // the same plaintext written twice gets a fresh pad
    for (int k = 0; k < 8; k++) old[k] = u_mem.words[(LINES - 1) * 8 + k];
    write_line(LINES - 1, sb_data[LINES - 1]);
    check("fresh pad on rewrite", u_mem.words[(LINES - 1) * 8] != old[0]);
    if (u_mem.words[(LINES - 1) * 8] != old[0]) n_fresh_pad++;
    // the 128-bit pad covers the line twice: words k and k+4 share it
    for (int k = 0; k < 4; k++)
      check("pad used twice per line",
            (u_mem.words[(LINES - 1) * 8 + k] ^ u_mem.words[(LINES - 1) * 8 + k + 4]) ==
            (sb_data[LINES - 1][k] ^ sb_data[LINES - 1][k + 4]));

    // fast SDRAM: data waits for the pad
    u_mem.read_latency = 2;
    read_line(0, 1'b0, lr);
    u_mem.read_latency = 12;

    // attacks
    spoof(0);                    read_line(0, 1'b1, lr);            n_spoof++;
    relocate(RO_LINES, LINES - 1); read_line(LINES - 1, 1'b1, lr);  n_reloc++;
    random_line(d); write_line(RO_LINES + 9, d);
    for (int k = 0; k < 8; k++) old[k] = u_mem.words[(RO_LINES + 9) * 8 + k];
    random_line(d); write_line(RO_LINES + 9, d);
    for (int k = 0; k < 8; k++) u_mem.words[(RO_LINES + 9) * 8 + k] = old[k];
    sb_ok[RO_LINES + 9] = 1'b0;
    read_line(RO_LINES + 9, 1'b1, lr);                               n_replay++;
    read_line(12345, 1'b1, lr);                                      n_unwritten++;

    // random traffic over a window of lines in both regions
    for (int n = 0; n < 300; n++) begin
      line = (n % 2 == 0) ? $urandom_range(RO_LINES - 1, RO_LINES - 20)
                          : $urandom_range(LINES - 1, LINES - 20);
      u_mem.read_latency = $urandom_range(16, 1);
      op = $urandom_range(9);
      if (op < 4 || !sb_ok[line]) begin
        random_line(d);
        write_line(line, d);
      end else if (op < 8) begin
        read_line(line, 1'b0, lr);
      end else if (op == 8) begin
        spoof(line);
        read_line(line, 1'b1, lr);
        n_spoof++;
      end else begin
        line2 = line ^ 1;
        if (sb_ok[line2]) begin
          relocate(line2, line);
          read_line(line, 1'b1, lr);
          n_reloc++;
        end
      end
    end

    $display("writes rw=%0d ro=%0d, clean reads=%0d, pad-bound=%0d data-bound=%0d",
             n_rw_write, n_ro_write, n_clean_read, n_pad_wait, n_data_wait);
    $display("detected: spoof=%0d relocation=%0d replay=%0d unwritten=%0d, fresh pads=%0d",
             n_spoof, n_reloc, n_replay, n_unwritten, n_fresh_pad);
    check("read-write line writes happened", n_rw_write > 0);
    check("read-only line writes happened", n_ro_write > 0);
    check("clean reads happened", n_clean_read > 0);
    check("reads waiting for the pad happened", n_pad_wait > 0);
    check("reads waiting for the data happened", n_data_wait > 0);
    check("spoofing detected", n_spoof > 0);
    check("relocation detected", n_reloc > 0);
    check("replay detected", n_replay > 0);
    check("unwritten line flagged", n_unwritten > 0);
    check("fresh pad on rewrite", n_fresh_pad > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

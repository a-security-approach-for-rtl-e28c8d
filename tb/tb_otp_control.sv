// tb_otp_control -- tests the OTP sequencer on its own.
//
// The AES pad generator is replaced by a stand-in with the same handshake and
// latency (11 clocks) whose pad is a simple public function of the input block,
// so the testbench can predict every ciphertext word. The real CRC unit and
// on-chip stores are used, and a behavioural SDRAM holds the ciphertext.
// A reduced memory (4 KB: 2 KB read-only, 2 KB read-write) keeps the clear
// sweep short. Checked: the clear sweep length, ciphertext = plaintext ^ pad
// with the 128-bit pad used twice per line, time-stamp increments (and none for
// read-only lines), stored tags, plaintext returned on reads, the 12-clock
// write latency and the 11-clock read latency behind the SDRAM data, a read
// held back by a late pad when the SDRAM is fast, and the error flag for a
// tampered, relocated, replayed and never-written line.
module tb_otp_control;
  import otp_pkg::*;

  localparam int unsigned MEM_BYTES = 4096;
  localparam int unsigned RO_BYTES  = 2048;
  localparam int unsigned ADDR_W    = 12;
  localparam int unsigned LINES     = MEM_BYTES / 32;
  localparam int unsigned RO_LINES  = RO_BYTES / 32;
  localparam logic [63:0] PAD_VALUE = 64'hC0DE_0000_0000_0001;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic              cache_req_valid, cache_req_ready, cache_req_we, cache_wvalid;
  logic [ADDR_W-1:0] cache_req_addr;
  word_t             cache_wdata, cache_rdata;
  logic              cache_wdone, cache_rvalid, cache_rerr, integrity_alarm;
  logic              mem_req_valid, mem_req_ready, mem_req_we, mem_wvalid, mem_rvalid;
  logic [ADDR_W-1:0] mem_req_addr;
  word_t             mem_wdata, mem_rdata;
  logic              aes_start, aes_ct_valid;
  block_t            aes_pt, aes_ct;
  logic              crc_in_valid, crc_out_valid;
  line_t             crc_line;
  crc_t              crc_value;
  logic [5:0]        ts_addr;
  logic              ts_we;
  ts_t               ts_wdata, ts_rdata;
  logic [6:0]        cm_addr;
  logic              cm_we;
  crc_t              cm_wdata, cm_rdata;

  otp_control #(.MEM_BYTES(MEM_BYTES), .RO_BYTES(RO_BYTES), .PAD_VALUE(PAD_VALUE)) dut (.*);

  crc32_line  u_crc (.clk, .rst_n, .in_valid(crc_in_valid), .line(crc_line),
                     .out_valid(crc_out_valid), .crc(crc_value));
  ts_memory  #(.DEPTH(64))  u_ts (.clk, .addr(ts_addr), .we(ts_we), .wdata(ts_wdata), .rdata(ts_rdata));
  crc_memory #(.DEPTH(128)) u_cm (.clk, .addr(cm_addr), .we(cm_we), .wdata(cm_wdata), .rdata(cm_rdata));
  sdram_model #(.MEM_BYTES(MEM_BYTES)) u_mem (.*);

  // ---- stand-in pad generator: 11-clock latency, public pad function ---------
  function automatic block_t toy_pad(input block_t b);
    word_t ts, ad;
    ts = b[127:96];
    ad = b[95:64];
    return {ts * 32'h9E37_79B9 ^ ad, ad * 32'h0100_0193 + ts, b[63:32] ^ ts ^ {ad[15:0], ad[31:16]},
            b[31:0] + ad + 32'h5555_0000 * ts};
  endfunction

  int     pad_cnt = 0;
  block_t pad_in;
  always @(posedge clk) begin
    if (!rst_n) begin
      pad_cnt      <= 0;
      aes_ct_valid <= 1'b0;
      aes_ct       <= '0;
    end else if (aes_start) begin
      pad_cnt      <= 10;
      pad_in       <= aes_pt;
      aes_ct_valid <= 1'b0;
    end else if (pad_cnt > 0) begin
      pad_cnt <= pad_cnt - 1;
      if (pad_cnt == 1) begin
        aes_ct_valid <= 1'b1;
        aes_ct       <= toy_pad(pad_in);
      end
    end
  end

  // ---- bookkeeping -----------------------------------------------------------
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%0d]: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
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

  // advance one clock and let the design's registers settle before looking
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  word_t shadow_ts [LINES];   // expected time stamp of each line

  // first-beat timing probes
  int t_first_mem_w, t_first_mem_r, t_first_resp;

  task automatic write_line(input int line, input word_t data [8]);
    int t_req;
    line_t plain;
    block_t pad;
    while (!cache_req_ready) tick();
    cache_req_valid <= 1'b1;
    cache_req_we    <= 1'b1;
    cache_req_addr  <= ADDR_W'(line * 32);
    cache_wdata     <= data[0];
    t_req = cyc;
    tick();
    cache_req_valid <= 1'b0;
    for (int k = 1; k < 8; k++) begin
      cache_wvalid <= 1'b1;
      cache_wdata  <= data[k];
      tick();
    end
    cache_wvalid <= 1'b0;
    t_first_mem_w = -1;
    while (!cache_wdone) begin
      if (mem_req_valid && mem_req_ready && t_first_mem_w < 0) t_first_mem_w = cyc;
      tick();
    end
    tick();
    if (line >= int'(RO_LINES)) shadow_ts[line] = shadow_ts[line] + 1;
    check($sformatf("write latency %0d, expected 12", t_first_mem_w - t_req), t_first_mem_w - t_req == 12);
    pad = toy_pad({shadow_ts[line], 32'(line * 32), PAD_VALUE});
    for (int k = 0; k < 8; k++) plain[32*k +: 32] = data[k];
    for (int k = 0; k < 8; k++)
      check($sformatf("line %0d word %0d ciphertext", line, k),
            u_mem.words[line * 8 + k] == (data[k] ^ pad[32*(k % 4) +: 32]));
    if (line >= int'(RO_LINES))
      check("stored time stamp", u_ts.mem[line - int'(RO_LINES)] == shadow_ts[line]);
    check("stored tag", u_cm.mem[line] == ref_crc(plain));
  endtask

  task automatic read_line(input int line, input word_t exp [8], input logic exp_err,
                           output int lat_req, output int lat_data);
    int t_req, k;
    logic alarm_seen;
    while (!cache_req_ready) tick();
    cache_req_valid <= 1'b1;
    cache_req_we    <= 1'b0;
    cache_req_addr  <= ADDR_W'(line * 32 + 4);   // any address inside the line
    t_req = cyc;
    tick();
    cache_req_valid <= 1'b0;
    t_first_mem_r = -1;
    while (!cache_rvalid) begin
      if (mem_rvalid && t_first_mem_r < 0) t_first_mem_r = cyc;
      tick();
    end
    lat_req  = cyc - t_req;
    lat_data = cyc - t_first_mem_r;
    k = 0;
    alarm_seen = 1'b0;
    while (cache_rvalid) begin
      if (integrity_alarm) alarm_seen = 1'b1;
      check($sformatf("line %0d error flag %0b expected %0b", line, cache_rerr, exp_err), cache_rerr == exp_err);
      if (!exp_err) check($sformatf("line %0d word %0d plaintext", line, k), cache_rdata == exp[k]);
      k++;
      tick();
    end
    check("eight response beats", k == 8);
    check("alarm pulse matches the error flag", alarm_seen == exp_err);
  endtask

  initial begin
    word_t a [8], b [8], c [8], saved [8];
    int lr, ld, t0;
    for (int i = 0; i < int'(LINES); i++) shadow_ts[i] = '0;
    rst_n           = 1'b0;
    cache_req_valid = 1'b0;
    cache_req_we    = 1'b0;
    cache_req_addr  = '0;
    cache_wdata     = '0;
    cache_wvalid    = 1'b0;
    repeat (3) tick();
    rst_n <= 1'b1;
    t0 = cyc;         // first clock edge out of reset ends this cycle
    while (!cache_req_ready) tick();
    check($sformatf("clear sweep %0d clocks, expected %0d", cyc - t0, LINES), cyc - t0 == int'(LINES));

    for (int k = 0; k < 8; k++) begin
      a[k] = $urandom;
      b[k] = $urandom;
      c[k] = 32'h1111_0000 + 32'(k);
    end

    // read-write line: write, read back, latency behind long-latency SDRAM
    write_line(70, a);
    read_line(70, a, 1'b0, lr, ld);
    check($sformatf("read latency behind SDRAM data %0d, expected 11", ld), ld == 11);
    // same data again: fresh time stamp, different ciphertext
    for (int k = 0; k < 8; k++) saved[k] = u_mem.words[70 * 8 + k];
    write_line(70, a);
    check("rewrite of equal data changes the ciphertext", u_mem.words[70 * 8] != saved[0]);
    read_line(70, a, 1'b0, lr, ld);

    // read-only line: time stamp stays 0
    write_line(5, c);
    check("no time stamp kept for read-only lines", shadow_ts[5] == 0);
    read_line(5, c, 1'b0, lr, ld);

    // fast SDRAM: the pad is the later input, data waits for it
    u_mem.read_latency = 1;
    read_line(70, a, 1'b0, lr, ld);
    check($sformatf("fast SDRAM: response %0d clocks after request, expected 16", lr), lr == 16);
    u_mem.read_latency = 12;
    read_line(70, a, 1'b0, lr, ld);
    check($sformatf("slow SDRAM: response %0d clocks after request, expected 24", lr), lr == 24);

    // spoofing: one ciphertext bit changed
    write_line(71, b);
    u_mem.words[71 * 8 + 3] = u_mem.words[71 * 8 + 3] ^ 32'h0000_0100;
    read_line(71, b, 1'b1, lr, ld);
    // relocation: line 70 copied over line 71
    for (int k = 0; k < 8; k++) u_mem.words[71 * 8 + k] = u_mem.words[70 * 8 + k];
    read_line(71, b, 1'b1, lr, ld);
    // replay: old ciphertext of line 72 put back after a newer write
    write_line(72, a);
    for (int k = 0; k < 8; k++) saved[k] = u_mem.words[72 * 8 + k];
    write_line(72, b);
    read_line(72, b, 1'b0, lr, ld);
    for (int k = 0; k < 8; k++) u_mem.words[72 * 8 + k] = saved[k];
    read_line(72, a, 1'b1, lr, ld);
    // never written line
    read_line(100, a, 1'b1, lr, ld);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_crc_memory -- checks the integrity-tag RAM at its full 16384 x 32 size:
// random writes followed by reads against a shadow copy, the one-clock read
// latency, and read-before-write behaviour when a word is read and written in
// the same clock.
module tb_crc_memory;
  import otp_pkg::*;

  localparam int unsigned DEPTH = 16384;

  logic        clk = 1'b0;
  logic [13:0] addr;
  logic        we;
  crc_t         wdata, rdata;
  crc_t         shadow [DEPTH];
  logic        written [DEPTH];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  crc_memory dut (.clk, .addr, .we, .wdata, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [13:0] a;
    crc_t d;
    for (int i = 0; i < DEPTH; i++) written[i] = 1'b0;
    we = 1'b0;
    addr = '0;
    wdata = '0;
    @(posedge clk);
    // fill the first and last words and random ones
    for (int n = 0; n < 3000; n++) begin
      a = (n == 0) ? 14'd0 : (n == 1) ? 14'(DEPTH - 1) : 14'($urandom_range(DEPTH - 1));
      d = $urandom;
      addr <= a; we <= 1'b1; wdata <= d;
      @(posedge clk);
      shadow[a] = d;
      written[a] = 1'b1;
    end
    we <= 1'b0;
    for (int n = 0; n < DEPTH; n++) begin
      if (!written[n]) continue;
      addr <= 14'(n);
      @(posedge clk);
      #1;
      check($sformatf("word %0d", n), rdata == shadow[n]);
    end
    // read-before-write
    a = 14'd77;
    if (!written[a]) begin shadow[a] = '0; end
    addr <= a; we <= 1'b1; wdata <= 32'hA5A5_0001;
    @(posedge clk);
    #1;
    if (written[a]) check("read-before-write returns the old word", rdata == shadow[a]);
    we <= 1'b0;
    @(posedge clk);
    #1;
    check("new word after the write", rdata == 32'hA5A5_0001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

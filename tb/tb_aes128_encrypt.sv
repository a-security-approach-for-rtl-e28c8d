// tb_aes128_encrypt -- known-answer test of the AES-128 encryption core.
//
// Drives the FIPS-197 example vectors (Appendix B and C.1) and the four
// NIST SP 800-38A ECB-AES128 vectors, checks each ciphertext and checks that
// ct_valid rises exactly 11 clocks after start. Also checks that a start
// issued while the core is busy restarts it and yields the new block's result.
module tb_aes128_encrypt;
  import otp_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n;
  block_t key, pt, ct;
  logic   start, busy, ct_valid;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes128_encrypt dut (.clk, .rst_n, .key, .start, .pt, .busy, .ct_valid, .ct);

  initial begin
    repeat (2000) @(posedge clk);
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

  task automatic run(input block_t k, input block_t p, input block_t exp_ct);
    int n;
    key   <= k;
    pt    <= p;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    pt    <= '0;
    n = 0;
    do begin
      @(posedge clk);
      n++;
    end while (!ct_valid && n < 40);
    check($sformatf("ct %h expected %h", ct, exp_ct), ct == exp_ct);
    check($sformatf("latency %0d expected 11", n), n == 11);
    repeat (3) @(posedge clk);
    check("ct held after completion", ct_valid && ct == exp_ct);
  endtask

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    key   = '0;
    pt    = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check("idle after reset", !busy && !ct_valid);
    // FIPS-197 Appendix C.1
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    // FIPS-197 Appendix B
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    // SP 800-38A F.1.1
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h6bc1bee22e409f96e93d7e117393172a,
        128'h3ad77bb40d7a3660a89ecaf32466ef97);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
        128'hf5d3d58503b9699de785895a96fdbaaf);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h30c81c46a35ce411e5fbc1191a0a52ef,
        128'h43b1cd7f598ece23881b00e3ed030688);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'hf69f2445df4f9b17ad2b417be66c3710,
        128'h7b0c785e27e8ad3f8223207104725dd4);
    // restart while busy: the first block is abandoned
    key   <= 128'h2b7e151628aed2a6abf7158809cf4f3c;
    pt    <= 128'h00112233445566778899aabbccddeeff;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    repeat (4) @(posedge clk);
    check("busy during rounds", busy && !ct_valid);
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

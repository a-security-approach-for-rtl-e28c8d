// aes128_encrypt -- iterative AES-128 encryption core (FIPS-197), used as the
// one-time-pad (OTP) generator of the memory security core.
//
// In OTP mode the data never passes through AES: AES encrypts the block
// {time stamp, address, padding} under a secret on-chip key, and the 128-bit
// result is the pad that is XORed with the data. Only the forward cipher is
// therefore needed, for reads as well as writes.
//
// How it works: on `start` the input block is XORed with the key (initial
// AddRoundKey) and the key is loaded into the round-key register. Each of the
// next ten clocks performs one round (SubBytes, ShiftRows, MixColumns except in
// round 10, AddRoundKey) while the next round key is expanded on the fly from
// the current one, so no key schedule is stored. The sixteen state S-boxes and
// the four key-schedule S-boxes read a ROM that the package computes at
// elaboration.
//
// Interface and timing: `start` is accepted in any cycle (a start while busy
// restarts the core). `ct_valid` rises 11 clocks after the cycle in which
// `start` was high and stays high, with `ct` stable, until the next `start`.
// Together with the one-clock XOR that follows it, this gives the 12-cycle pad
// generation time of the reference system. Byte 0 of a block is bits
// [127:120], as in FIPS-197. The round structure is the standard cipher; the
// one-round-per-clock organisation is this design's choice.
module aes128_encrypt
  import otp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  block_t key,
  input  logic   start,
  input  block_t pt,
  output logic   busy,
  output logic   ct_valid,
  output block_t ct
);

  localparam int unsigned ROUNDS = 10;

  // ---- round functions ----------------------------------------------------
  function automatic block_t sub_shift(input block_t s);
    // SubBytes followed by ShiftRows; byte index b = 4*column + row
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = SBOX[s[127 - 8*(4*((c + r) % 4) + r) -: 8]];
    return o;
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = s[127 - 32*c -: 8];
      a1 = s[119 - 32*c -: 8];
      a2 = s[111 - 32*c -: 8];
      a3 = s[103 - 32*c -: 8];
      o[127 - 32*c -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      o[119 - 32*c -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      o[111 - 32*c -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      o[103 - 32*c -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  function automatic block_t next_round_key(input block_t k, input logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    // RotWord, SubWord, Rcon applied to the last word
    t  = {SBOX[w3[23:16]] ^ rcon, SBOX[w3[15:8]], SBOX[w3[7:0]], SBOX[w3[31:24]]};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // ---- datapath -----------------------------------------------------------
  block_t     state_q, rkey_q;
  logic [7:0] rcon_q;
  logic [3:0] round_q;        // round performed in the current busy cycle
  logic       busy_q, valid_q;

  block_t rkey_next, round_out;

  always_comb begin
    rkey_next = next_round_key(rkey_q, rcon_q);
    if (round_q == 4'(ROUNDS))
      round_out = sub_shift(state_q) ^ rkey_next;
    else
      round_out = mix_columns(sub_shift(state_q)) ^ rkey_next;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      valid_q <= 1'b0;
      round_q <= '0;
      rcon_q  <= 8'h01;
      state_q <= '0;
      rkey_q  <= '0;
    end else if (start) begin
      state_q <= pt ^ key;
      rkey_q  <= key;
      rcon_q  <= 8'h01;
      round_q <= 4'd1;
      busy_q  <= 1'b1;
      valid_q <= 1'b0;
    end else if (busy_q) begin
      state_q <= round_out;
      rkey_q  <= rkey_next;
      rcon_q  <= xtime(rcon_q);
      round_q <= round_q + 4'd1;
      if (round_q == 4'(ROUNDS)) begin
        busy_q  <= 1'b0;
        valid_q <= 1'b1;
      end
    end
  end

  assign busy     = busy_q;
  assign ct_valid = valid_q;
  assign ct       = state_q;

endmodule

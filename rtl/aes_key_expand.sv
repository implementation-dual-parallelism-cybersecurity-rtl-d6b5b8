// aes_key_expand: AES-128 key schedule (FIPS-197 section 5.2).
//
// When key_load is high the 128-bit cipher key is expanded into the 11 round
// keys of AES-128 in one clock: the ten key-schedule steps
// (RotWord, SubWord, Rcon, XOR chain) are unrolled combinationally and the
// result is registered. round_keys[0] is the cipher key itself, round_keys[10]
// the last round key; both the encryption and the decryption pipeline read
// them from here. key_ready rises the cycle after key_load and stays high
// until reset. The registered keys change only on key_load, so a key should be
// loaded while the cipher pipeline is empty.
//
// The document fixes only that the key is 128 bits long; the one-cycle
// unrolled expansion held in registers is a choice of this design that lets
// every pipeline stage read its round key at once.
module aes_key_expand
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        key_load,
  input  key_t        key,
  output logic        key_ready,
  output round_keys_t round_keys
);

  round_keys_t rk_next;

  always_comb begin
    rk_next[0] = key;
    for (int r = 1; r <= int'(NR); r++)
      rk_next[r] = next_round_key(rk_next[r-1], rcon(r));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_ready <= 1'b0;
      for (int r = 0; r <= int'(NR); r++) round_keys[r] <= '0;
    end else if (key_load) begin
      key_ready  <= 1'b1;
      round_keys <= rk_next;
    end
  end

endmodule

// aes_core: deeply pipelined AES-128 encryption/decryption unit.
//
// The ten rounds of AES-128 are unrolled into eleven register stages
// (initial AddRoundKey plus one stage per round, see aes_round), so a new
// 128-bit block can enter on every clock and leaves exactly AES_LATENCY = 11
// clocks later with the same mode tag. There is no back-pressure: every
// accepted block comes out, in order. The key is loaded through
// aes_key_expand (key_load, one clock) and should be changed only while no
// block is in flight.
//
// The document asks for AES-128 (128-bit key and block) with deep
// pipelining so that one engine processes a 128-bit block per cycle at its
// clock; the stage split (one round per stage) and the per-block mode tag
// that lets encryption and decryption share the pipeline are this design's
// choices.
//
// Interface: in_valid/in_mode/in_block on one clock edge, out_valid/out_mode/
// out_block AES_LATENCY clocks later. Byte order as in FIPS-197 (byte 0 in
// bits [127:120]).
module aes_core
  import aes_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      key_load,
  input  key_t      key,
  output logic      key_ready,
  input  logic      in_valid,
  input  aes_mode_e in_mode,
  input  block_t    in_block,
  output logic      out_valid,
  output aes_mode_e out_mode,
  output block_t    out_block
);

  round_keys_t rk;

  logic      v [NR+2];
  aes_mode_e m [NR+2];
  block_t    s [NR+2];

  aes_key_expand u_keys (
    .clk, .rst_n, .key_load, .key, .key_ready, .round_keys(rk)
  );

  assign v[0] = in_valid;
  assign m[0] = in_mode;
  assign s[0] = in_block;

  for (genvar r = 0; r <= NR; r++) begin : g_stage
    aes_round #(.ROUND(r)) u_round (
      .clk, .rst_n,
      .in_valid (v[r]),   .in_mode (m[r]),   .in_state (s[r]),
      .enc_key  (rk[r]),  .dec_key (rk[NR-r]),
      .out_valid(v[r+1]), .out_mode(m[r+1]), .out_state(s[r+1])
    );
  end

  assign out_valid = v[NR+1];
  assign out_mode  = m[NR+1];
  assign out_block = s[NR+1];

endmodule

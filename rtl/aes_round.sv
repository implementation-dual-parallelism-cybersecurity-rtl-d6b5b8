// aes_round: one registered stage of the unrolled AES-128 pipeline.
//
// Stage ROUND = 0 is the initial AddRoundKey. Stage ROUND = 1..10 is one
// cipher round. Each stage does either direction, chosen per block by the
// mode bit that travels with the block:
//   encrypt round r: SubBytes, ShiftRows, MixColumns (not in round 10),
//                    AddRoundKey with round key r
//   decrypt round r: InvShiftRows, InvSubBytes, AddRoundKey with round key
//                    10-r, InvMixColumns (not in round 10)
// which is the straightforward inverse cipher of FIPS-197 section 5.3. The
// caller supplies both candidate round keys; the stage selects by mode.
// Latency is one clock; a new block can enter every clock.
module aes_round
  import aes_pkg::*;
#(
  parameter int unsigned ROUND = 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  aes_mode_e in_mode,
  input  block_t    in_state,
  input  block_t    enc_key,    // round key ROUND
  input  block_t    dec_key,    // round key NR-ROUND
  output logic      out_valid,
  output aes_mode_e out_mode,
  output block_t    out_state
);

  block_t nxt;

  always_comb begin
    if (ROUND == 0) begin
      nxt = in_state ^ ((in_mode == AES_ENCRYPT) ? enc_key : dec_key);
    end else if (in_mode == AES_ENCRYPT) begin
      nxt = shift_rows(sub_bytes(in_state));
      if (ROUND != NR) nxt = mix_columns(nxt);
      nxt = nxt ^ enc_key;
    end else begin
      nxt = inv_sub_bytes(inv_shift_rows(in_state)) ^ dec_key;
      if (ROUND != NR) nxt = inv_mix_columns(nxt);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_mode  <= AES_ENCRYPT;
      out_state <= '0;
    end else begin
      out_valid <= in_valid;
      out_mode  <= in_mode;
      out_state <= nxt;
    end
  end

endmodule

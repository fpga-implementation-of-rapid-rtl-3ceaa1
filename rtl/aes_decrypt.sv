// aes_decrypt: AES-128 decryption unit (FIPS-197 inverse cipher), single-cycle.
//
// Fully unrolled like aes_encrypt. It starts with AddRoundKey of the last
// round key (10), then a round of InvShiftRows, InvSubBytes and AddRoundKey
// with key 9, then nine rounds of InvMixColumns, InvShiftRows, InvSubBytes
// and AddRoundKey with keys 8 down to 0. The round keys come from the same
// forward key schedule as encryption, used in reverse order.
//
// Interface: key and text_in (ciphertext) in, text_out (plaintext) out;
// purely combinational.
module aes_decrypt
  import mcs_pkg::*;
(
  input  block_t key,
  input  block_t text_in,
  output block_t text_out
);

  round_keys_t rk;
  block_t      state [AES_NR+1];  // [i] = state after i inverse rounds

  aes_key_expand u_keys (.key(key), .round_keys(rk));

  assign state[0] = text_in ^ rk[AES_NR];

  for (genvar i = 1; i <= AES_NR; i++) begin : g_round
    aes_dec_round #(.FIRST(i == 1)) u_round (
      .state_in (state[i-1]),
      .round_key(rk[AES_NR-i]),
      .state_out(state[i])
    );
  end

  assign text_out = state[AES_NR];

endmodule

// aes_encrypt: AES-128 encryption unit (FIPS-197), single-cycle.
//
// The design replaces a multi-cycle cipher with one that finishes within a
// single CPU clock cycle, so the cipher is fully unrolled here: the initial
// AddRoundKey with round key 0, nine full rounds (SubBytes, ShiftRows,
// MixColumns, AddRoundKey) and a final round without MixColumns. The key
// schedule is expanded inside the unit from the 128-bit key.
//
// Interface: key and text_in in, text_out out; purely combinational, so
// text_out is valid in the same cycle as its inputs. Registering the result
// is left to the surrounding system.
module aes_encrypt
  import mcs_pkg::*;
(
  input  block_t key,
  input  block_t text_in,
  output block_t text_out
);

  round_keys_t rk;
  block_t      state [AES_NR+1];  // [r] = state after round r

  aes_key_expand u_keys (.key(key), .round_keys(rk));

  assign state[0] = text_in ^ rk[0];

  for (genvar r = 1; r <= AES_NR; r++) begin : g_round
    aes_enc_round #(.FINAL(r == AES_NR)) u_round (
      .state_in (state[r-1]),
      .round_key(rk[r]),
      .state_out(state[r])
    );
  end

  assign text_out = state[AES_NR];

endmodule

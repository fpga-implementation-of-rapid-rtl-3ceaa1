// aes_enc_round: one AES encryption round, combinational.
//
// SubBytes, ShiftRows, MixColumns (left out when FINAL is set, as in the
// last AES round) and AddRoundKey. Ten of these follow the initial key
// addition inside aes_encrypt.
module aes_enc_round
  import mcs_pkg::*;
#(
  parameter bit FINAL = 1'b0  // 1: last round, no MixColumns
) (
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  block_t shifted;

  always_comb begin
    shifted = shift_rows(sub_bytes(state_in));
    if (FINAL) state_out = shifted ^ round_key;
    else       state_out = mix_columns(shifted) ^ round_key;
  end

endmodule

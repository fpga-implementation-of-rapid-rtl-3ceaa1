// aes_dec_round: one round of the AES inverse cipher, combinational.
//
// Ordered as the design's decryption flow draws it: InvMixColumns (left out
// when FIRST is set), InvShiftRows, InvSubBytes, AddRoundKey. The first
// round after the initial addition of the last round key has no
// InvMixColumns; every later one has.
module aes_dec_round
  import mcs_pkg::*;
#(
  parameter bit FIRST = 1'b0  // 1: round right after the initial key addition
) (
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  block_t mixed;

  always_comb begin
    mixed     = FIRST ? state_in : inv_mix_columns(state_in);
    state_out = inv_sub_bytes(inv_shift_rows(mixed)) ^ round_key;
  end

endmodule

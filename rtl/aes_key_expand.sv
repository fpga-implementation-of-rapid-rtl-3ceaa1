// aes_key_expand: AES-128 key schedule, fully combinational.
//
// Expands the 128-bit cipher key into the 11 round keys of AES-128
// (FIPS-197 section 5.2). Round key 0 is the cipher key itself; round key r
// is derived from round key r-1 by one key-schedule step with round constant
// x^(r-1). The encryption unit uses the keys in order 0..10, the decryption
// unit in order 10..0, as the design's inverse cipher reuses the same
// schedule in reverse.
//
// Interface: key in, round_keys out ([r] = round key r). No clock: the ten
// steps settle within the same cycle as the key, which is what lets the
// whole cipher finish in one CPU cycle.
module aes_key_expand
  import mcs_pkg::*;
(
  input  block_t      key,
  output round_keys_t round_keys
);

  always_comb begin
    block_t k;
    k             = key;
    round_keys[0] = k;
    for (int unsigned r = 1; r <= AES_NR; r++) begin
      k             = key_step(k, rcon(r));
      round_keys[r] = k;
    end
  end

endmodule

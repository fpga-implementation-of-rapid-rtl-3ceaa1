// rng_keygen: RNG cipher key generator, a 128-bit LFSR with a fixed seed.
//
// Supplies the 128-bit AES key to both cipher units. As in the FPGA
// prototype of the design, the random source is a pseudo-random LFSR loaded
// with a fixed seed at reset (an ASIC would put a true RNG here). The
// register shifts left by one bit per step; the new bit 0 is the XOR of
// bits 127, 125, 100 and 98, i.e. the polynomial
// x^128 + x^126 + x^101 + x^99 + 1 (a maximal-length choice of this design).
//
// A fresh key per transaction: each cycle with `advance` high moves the LFSR
// one step; otherwise the key holds, so that a word written under a key can
// be read back under the same key. Timing: key changes on the rising clock
// edge after `advance`. Reset is asynchronous, active low.
module rng_keygen
  import mcs_pkg::*;
#(
  parameter block_t SEED = 128'h3c6e_f372_a54f_f53a_510e_527f_9b05_688c
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   advance,  // step to the next key
  output block_t key
);

  block_t lfsr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_q <= SEED;
    end else begin
      // an all-zero register would lock the LFSR
      a_nonzero: assert (lfsr_q != '0);
      if (advance) lfsr_q <= {lfsr_q[126:0], lfsr_q[127] ^ lfsr_q[125] ^ lfsr_q[100] ^ lfsr_q[98]};
    end
  end

  assign key = lfsr_q;

endmodule

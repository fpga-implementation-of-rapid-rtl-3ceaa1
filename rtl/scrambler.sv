// scrambler: mixes the scramble data into the ciphertext on the write path.
//
// The 128-bit scramble word for the addressed location (scr_tx, from the
// user PIN, serial number and address via scramble_gen) is XORed onto the
// AES ciphertext; the result (scr_enc) is what the secured memory stores.
// Combinational: scr_enc follows its inputs in the same cycle.
module scrambler
  import mcs_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic [PIN_W-1:0]    pin,
  input  logic [SERIAL_W-1:0] serial_id,
  input  logic [ADDR_W-1:0]   addr,
  input  block_t              cipher_in,  // ciphertext from encryption
  output block_t              scr_tx,     // scramble data
  output block_t              scr_enc     // scrambled ciphertext to memory
);

  scramble_gen #(.ADDR_W(ADDR_W)) u_gen (.pin(pin), .serial_id(serial_id), .addr(addr), .pattern(scr_tx));

  assign scr_enc = cipher_in ^ scr_tx;

endmodule

// descrambler: removes the scramble data from a word read from memory.
//
// Regenerates the scramble word for the addressed location (scr_rx) from
// the user PIN, serial number and address, exactly as the scrambler did on
// the write, and XORs it off the stored word, giving back the ciphertext
// (scr_dec) for the decryption unit. With a wrong PIN the scramble word
// differs and the ciphertext, and so the decrypted data, is wrong.
// Combinational.
module descrambler
  import mcs_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic [PIN_W-1:0]    pin,
  input  logic [SERIAL_W-1:0] serial_id,
  input  logic [ADDR_W-1:0]   addr,
  input  block_t              mem_in,   // scrambled ciphertext from memory
  output block_t              scr_rx,   // scramble data
  output block_t              scr_dec   // recovered ciphertext
);

  scramble_gen #(.ADDR_W(ADDR_W)) u_gen (.pin(pin), .serial_id(serial_id), .addr(addr), .pattern(scr_rx));

  assign scr_dec = mem_in ^ scr_rx;

endmodule

// scramble_gen: scramble-data generator shared by scrambler and descrambler.
//
// Builds the 128-bit scramble word for one memory location from the user
// PIN, the card serial number and the word address. The design only says
// that the scramble data is 128 bits and derived from the PIN; the mapping
// here is this design's own: the seed {PIN, serial, ~PIN, address} is run
// through three rounds of 128-bit xorshift (x ^= x<<29; x ^= x>>41;
// x ^= x<<7). Every step is an invertible linear map, so two different
// seeds always give different scramble words: a wrong PIN always yields
// wrong data. Combinational.
module scramble_gen
  import mcs_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic [PIN_W-1:0]    pin,
  input  logic [SERIAL_W-1:0] serial_id,
  input  logic [ADDR_W-1:0]   addr,
  output block_t              pattern
);

  always_comb begin
    block_t x;
    x = {pin, serial_id, ~pin, 32'(addr)};
    for (int i = 0; i < 3; i++) begin
      x = x ^ (x << 29);
      x = x ^ (x >> 41);
      x = x ^ (x << 7);
    end
    pattern = x;
  end

endmodule

// secure_mem: secured data memory holding scrambled ciphertext words.
//
// One 128-bit word per CPU data byte, DEPTH = 2**ADDR_W words (256 by
// default, this design's choice). Synchronous write on the rising edge when
// `we` is high; asynchronous read, so that a read request is descrambled,
// decrypted and registered for the CPU within the same clock cycle. A read
// of the word being written in the same cycle returns the old contents.
// No reset: a word reads as unknown until written.
module secure_mem
  import mcs_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  block_t            wdata,
  input  logic [ADDR_W-1:0] raddr,
  output block_t            rdata
);

  block_t mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule

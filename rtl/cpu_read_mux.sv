// cpu_read_mux: the CPU-side 2:1 multiplexer and read register.
//
// Selects, under the CPU's decrypt-enable signal, between the scrambled
// ciphertext of the write path (input 0) and the decrypted plaintext of the
// read path (input 1), and registers the choice on the rising edge of a
// cycle with `load` high. The full 128-bit block and its low byte (the
// 8-bit CPU data) are brought out. Reset (asynchronous, active low) clears
// the register.
module cpu_read_mux
  import mcs_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic                  decrypt_enable,
  input  block_t                scr_cipher,  // input 0
  input  block_t                plain,       // input 1
  output block_t                rblock,
  output logic [CPU_DATA_W-1:0] rdata
);

  block_t q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= decrypt_enable ? plain : scr_cipher;
  end

  assign rblock = q;
  assign rdata  = q[CPU_DATA_W-1:0];

endmodule

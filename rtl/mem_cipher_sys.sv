// mem_cipher_sys: smart card memory ciphering system (top).
//
// Sits between an 8-bit smart card CPU and its secured data memory and
// keeps everything stored there encrypted and scrambled:
//   write: plaintext byte -> zero-extended to 128 bits -> AES-128 encryption
//          under the key from the LFSR key generator -> XOR with PIN-derived
//          scramble data -> secured memory
//   read:  secured memory -> XOR with the same scramble data -> AES-128
//          decryption -> CPU
// A 2:1 multiplexer under the CPU's decrypt_enable picks what the CPU read
// register receives: the scrambled ciphertext of the write path (0) or the
// decrypted plaintext of the read path (1). The structure, the 128-bit
// blocks, the 8-bit CPU data, the LFSR key source with fixed seed and the
// PIN-based scrambler follow the design; the handshakes, address width,
// scramble function, LFSR polynomial and seed are this design's choices.
//
// Timing: the whole cipher path is combinational between clock edges, so
// every operation completes in one CPU clock cycle (the design's goal, 40 ns
// at a 25 MHz CPU clock). A write request (cpu_we) is encrypted, scrambled
// and stored at the rising edge ending its cycle; enc_done is high during
// the following cycle. A read request (cpu_re) is descrambled, decrypted and
// loaded into the read register at the rising edge ending its cycle;
// cpu_rdata/cpu_rblock hold it, and dec_done is high, in the following
// cycle. One 128-bit block per cycle in each direction.
//
// Round trip: cpu_we and cpu_re together store the word and, in the same
// cycle, feed it straight through descrambler and decryption (the stored
// word is bypassed to the read path), so with decrypt_enable high the read
// register receives the plaintext just written: the full encrypt, scramble,
// descramble, decrypt sequence within one CPU cycle, as the design
// demonstrates it.
//
// scr_tx and scr_rx (the scramble words) drive nothing here; they are kept
// as named nets for observation, hence the unused-signal lint warnings.
//
// Key per transaction: key_refresh high for a cycle moves the key generator
// to a new key at the next edge. Words written under an earlier key no
// longer decrypt, so a refresh starts a new transaction. Reset is
// asynchronous, active low.
module mem_cipher_sys
  import mcs_pkg::*;
#(
  parameter int unsigned ADDR_W   = 8,   // 2**ADDR_W secured words
  parameter block_t      KEY_SEED = 128'h3c6e_f372_a54f_f53a_510e_527f_9b05_688c
) (
  input  logic                  clk,            // CPU clock
  input  logic                  rst_n,
  input  logic                  key_refresh,    // new cipher key (new transaction)
  input  logic [PIN_W-1:0]      pin,            // user PIN
  input  logic [SERIAL_W-1:0]   serial_id,      // card serial number
  input  logic                  cpu_we,         // write cpu_wdata to cpu_addr
  input  logic                  cpu_re,         // read cpu_addr
  input  logic [ADDR_W-1:0]     cpu_addr,
  input  logic [CPU_DATA_W-1:0] cpu_wdata,
  input  logic                  decrypt_enable, // read mux select
  output logic [CPU_DATA_W-1:0] cpu_rdata,      // low byte of cpu_rblock
  output block_t                cpu_rblock,     // read register, 128 bits
  output logic                  enc_done,       // write completed last cycle
  output logic                  dec_done        // decrypted read completed last cycle
);

  block_t skey;            // cipher key
  block_t plaintext_blk;   // CPU byte, zero-extended
  block_t encrypted_text;  // AES ciphertext, write path
  block_t scr_tx, scr_enc; // scramble data, scrambled ciphertext
  block_t mem_rdata;       // secured word read
  block_t read_word;       // word entering the descrambler
  block_t scr_rx, scr_dec; // scramble data, recovered ciphertext
  block_t decrypted_text;  // AES plaintext, read path

  rng_keygen #(.SEED(KEY_SEED)) u_rng (
    .clk(clk), .rst_n(rst_n), .advance(key_refresh), .key(skey)
  );

  assign plaintext_blk = {{(BLOCK_W-CPU_DATA_W){1'b0}}, cpu_wdata};

  aes_encrypt u_enc (.key(skey), .text_in(plaintext_blk), .text_out(encrypted_text));

  scrambler #(.ADDR_W(ADDR_W)) u_scr (
    .pin(pin), .serial_id(serial_id), .addr(cpu_addr),
    .cipher_in(encrypted_text), .scr_tx(scr_tx), .scr_enc(scr_enc)
  );

  secure_mem #(.ADDR_W(ADDR_W)) u_mem (
    .clk(clk), .we(cpu_we), .waddr(cpu_addr), .wdata(scr_enc),
    .raddr(cpu_addr), .rdata(mem_rdata)
  );

  // Round trip: a write and a read in the same cycle descramble and decrypt
  // the word being written, so the whole path runs within one cycle.
  assign read_word = (cpu_we && cpu_re) ? scr_enc : mem_rdata;

  descrambler #(.ADDR_W(ADDR_W)) u_dscr (
    .pin(pin), .serial_id(serial_id), .addr(cpu_addr),
    .mem_in(read_word), .scr_rx(scr_rx), .scr_dec(scr_dec)
  );

  aes_decrypt u_dec (.key(skey), .text_in(scr_dec), .text_out(decrypted_text));

  cpu_read_mux u_mux (
    .clk(clk), .rst_n(rst_n), .load(cpu_we | cpu_re), .decrypt_enable(decrypt_enable),
    .scr_cipher(scr_enc), .plain(decrypted_text), .rblock(cpu_rblock), .rdata(cpu_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_done <= 1'b0;
      dec_done <= 1'b0;
    end else begin
      enc_done <= cpu_we;
      dec_done <= cpu_re & decrypt_enable;
    end
  end

endmodule

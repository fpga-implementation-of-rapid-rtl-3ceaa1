// tb_mem_cipher_sys: end-to-end test of the memory ciphering system at its
// default size (256 secured words, 128-bit AES blocks).
//
// Independent reference: a behavioural AES-128, the reference LFSR and the
// reference scramble function. The testbench keeps its own copy of the
// cipher key (seed after reset, one LFSR step per key_refresh) and of the
// plaintext written to each address, and checks:
//   * the write path: with decrypt_enable low, the read register after a
//     write holds AES(key, byte) XOR scramble(PIN, serial, address), the
//     word the secured memory stores;
//   * the read path: with decrypt_enable high, a read returns the byte
//     written (the byte 0x01 of the published example first);
//   * one block per cycle: enc_done / dec_done and the data appear in the
//     cycle right after each request, in back-to-back streams;
//   * the one-cycle round trip: write and read together return the byte
//     being written, decrypted from the word being stored;
//   * a wrong PIN or a refreshed key makes old words unreadable, while new
//     words under the new key read back correctly.
// Each mechanism (encrypting write, decrypting read, decrypt_enable low,
// wrong PIN, key refresh, back-to-back stream) is counted and must occur.
module tb_mem_cipher_sys;
  import mcs_pkg::*;
  import aes_ref_pkg::*;
  import mcs_ref_pkg::*;

  localparam int unsigned AW    = 8;   // the top's default ADDR_W
  // the top's default key seed
  localparam block_t      SEED  = 128'h3c6e_f372_a54f_f53a_510e_527f_9b05_688c;
  localparam logic [31:0] PIN   = 32'h0012_3456;
  localparam logic [31:0] SER   = 32'hC0FF_EE01;

  logic                  clk = 1'b0, rst_n = 1'b0;
  logic                  key_refresh = 1'b0, cpu_we = 1'b0, cpu_re = 1'b0, decrypt_enable = 1'b0;
  logic [PIN_W-1:0]      pin = PIN;
  logic [SERIAL_W-1:0]   serial_id = SER;
  logic [AW-1:0]         cpu_addr = '0;
  logic [CPU_DATA_W-1:0] cpu_wdata = '0;
  logic [CPU_DATA_W-1:0] cpu_rdata;
  block_t                cpu_rblock;
  logic                  enc_done, dec_done;

  block_t                key_model;
  logic [7:0]            shadow [2**AW];
  int                    checks = 0, failures = 0;
  int                    n_write = 0, n_read = 0, n_mode0 = 0, n_wrong_pin = 0, n_refresh = 0,
                         n_stream = 0, n_roundtrip = 0;

  mem_cipher_sys dut (
    .clk(clk), .rst_n(rst_n), .key_refresh(key_refresh), .pin(pin), .serial_id(serial_id),
    .cpu_we(cpu_we), .cpu_re(cpu_re), .cpu_addr(cpu_addr), .cpu_wdata(cpu_wdata),
    .decrypt_enable(decrypt_enable), .cpu_rdata(cpu_rdata), .cpu_rblock(cpu_rblock),
    .enc_done(enc_done), .dec_done(dec_done)
  );

  always #20 clk = ~clk;  // 40 ns CPU cycle (25 MHz)

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  function automatic block_t stored_word(input logic [7:0] b, input int unsigned a);
    return encrypt(key_model, {120'h0, b}) ^ scramble_ref(pin, serial_id, a);
  endfunction

  // One write; checks the cycle after it. With decrypt_enable low the read
  // register must show the scrambled ciphertext.
  task automatic do_write(input int unsigned a, input logic [7:0] b, input bit show);
    @(negedge clk);
    cpu_we = 1'b1; cpu_re = 1'b0; cpu_addr = AW'(a); cpu_wdata = b; decrypt_enable = !show;
    @(posedge clk);
    #1;
    cpu_we = 1'b0;
    shadow[a] = b;
    n_write++;
    check(enc_done === 1'b1, "enc_done one cycle after write");
    if (show) begin
      n_mode0++;
      check(cpu_rblock === stored_word(b, a), $sformatf("scrambled ciphertext at %0d", a));
    end
  endtask

  // One decrypting read; the data and dec_done appear the next cycle.
  task automatic do_read(input int unsigned a, input bit expect_ok);
    @(negedge clk);
    cpu_we = 1'b0; cpu_re = 1'b1; cpu_addr = AW'(a); decrypt_enable = 1'b1;
    @(posedge clk);
    #1;
    cpu_re = 1'b0;
    n_read++;
    check(dec_done === 1'b1, "dec_done one cycle after read");
    if (expect_ok) begin
      check(cpu_rblock === {120'h0, shadow[a]}, $sformatf("read back at %0d: got %h exp %h",
            a, cpu_rblock, shadow[a]));
      check(cpu_rdata === shadow[a], "cpu_rdata is the low byte");
    end else begin
      check(cpu_rblock !== {120'h0, shadow[a]}, $sformatf("unreadable word at %0d", a));
    end
  endtask

  initial begin
    int unsigned order [2**AW];
    int          t0;
    ref_init();
    key_model = SEED;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(enc_done === 1'b0 && dec_done === 1'b0 && cpu_rblock === '0, "reset state");

    // The published example: byte 0x01 stored, then read back as 0x01.
    do_write(0, 8'h01, 1'b1);
    do_read(0, 1'b1);
    check(cpu_rblock === 128'h1, "example byte 0x01 decrypted");

    // Fill every address, read all back in a shuffled order.
    for (int a = 0; a < 2**AW; a++) do_write(a, 8'($urandom), a % 4 == 0);
    for (int a = 0; a < 2**AW; a++) order[a] = a;
    order.shuffle();
    for (int a = 0; a < 2**AW; a++) do_read(order[a], 1'b1);

    // One-cycle round trip: write and read at once, decrypt_enable high.
    for (int i = 0; i < 32; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      @(negedge clk);
      cpu_we = 1'b1; cpu_re = 1'b1; cpu_addr = AW'(100 + i); cpu_wdata = b; decrypt_enable = 1'b1;
      @(posedge clk); #1;
      cpu_we = 1'b0; cpu_re = 1'b0;
      shadow[100 + i] = b;
      n_roundtrip++;
      check(enc_done === 1'b1 && dec_done === 1'b1, "round trip: both done flags after one cycle");
      check(cpu_rblock === {120'h0, b}, $sformatf("round trip returns %h, got %h", b, cpu_rblock));
    end

    // Back-to-back: 64 writes then 64 reads in consecutive cycles, one
    // 128-bit block per cycle in each direction.
    @(negedge clk);
    t0 = 0;
    for (int i = 0; i < 64; i++) begin
      cpu_we = 1'b1; cpu_re = 1'b0; cpu_addr = AW'(i); cpu_wdata = 8'(i * 7 + 3);
      decrypt_enable = 1'b1;
      shadow[i] = cpu_wdata;
      @(posedge clk); #1;
      check(enc_done === 1'b1, "stream write done every cycle");
      t0++;
      @(negedge clk);
    end
    cpu_we = 1'b0;
    for (int i = 0; i < 64; i++) begin
      cpu_re = 1'b1; cpu_addr = AW'(63 - i);
      @(posedge clk); #1;
      check(dec_done === 1'b1 && cpu_rblock === {120'h0, shadow[63 - i]}, "stream read every cycle");
      t0++;
      @(negedge clk);
    end
    cpu_re = 1'b0;
    check(t0 == 128, "128 blocks in 128 cycles");
    n_stream++;

    // Wrong PIN: stored words cannot be recovered.
    pin = PIN ^ 32'h0000_0001;
    for (int a = 0; a < 16; a++) begin do_read(a, 1'b0); n_wrong_pin++; end
    pin = PIN;
    for (int a = 0; a < 16; a++) do_read(a, 1'b1);

    // Key refresh (a new transaction): old words become unreadable; words
    // written under the new key read back.
    @(negedge clk) key_refresh = 1'b1;
    @(posedge clk) key_model = lfsr_next(key_model);
    #1 key_refresh = 1'b0;
    n_refresh++;
    for (int a = 0; a < 16; a++) do_read(a, 1'b0);
    for (int a = 0; a < 16; a++) do_write(a, 8'($urandom), 1'b1);
    for (int a = 0; a < 16; a++) do_read(a, 1'b1);

    check(n_write > 0, "encrypting write happened");
    check(n_read > 0, "decrypting read happened");
    check(n_mode0 > 0, "decrypt_enable low (scrambled ciphertext) happened");
    check(n_wrong_pin > 0, "wrong PIN happened");
    check(n_refresh > 0, "key refresh happened");
    check(n_stream > 0, "back-to-back stream happened");
    check(n_roundtrip > 0, "one-cycle round trip happened");
    $display("mechanisms: write=%0d read=%0d ciphertext_view=%0d wrong_pin=%0d key_refresh=%0d stream=%0d round_trip=%0d",
             n_write, n_read, n_mode0, n_wrong_pin, n_refresh, n_stream, n_roundtrip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

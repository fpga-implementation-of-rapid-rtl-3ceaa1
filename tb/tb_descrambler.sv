// tb_descrambler: checks that the descrambler removes the reference scramble
// word for (PIN, serial, address) from a stored word, recovering the
// ciphertext, and that a wrong PIN does not recover it.
module tb_descrambler;
  import mcs_pkg::*;
  import mcs_ref_pkg::*;

  localparam int unsigned AW = 8;

  logic                clk = 1'b0;
  logic [PIN_W-1:0]    pin;
  logic [SERIAL_W-1:0] serial_id;
  logic [AW-1:0]       addr;
  block_t              stored, scr_rx, scr_dec, cipher;
  int                  checks = 0, failures = 0;

  descrambler #(.ADDR_W(AW)) dut (.pin(pin), .serial_id(serial_id), .addr(addr), .mem_in(stored),
                                  .scr_rx(scr_rx), .scr_dec(scr_dec));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      pin = $urandom; serial_id = $urandom; addr = AW'($urandom);
      cipher = {$urandom, $urandom, $urandom, $urandom};
      stored = cipher ^ scramble_ref(pin, serial_id, addr);
      @(posedge clk);
      checks += 2;
      if (scr_dec !== cipher) begin failures++; $display("FAIL scr_dec %h exp %h", scr_dec, cipher); end
      if (scr_rx !== scramble_ref(pin, serial_id, addr)) begin failures++; $display("FAIL scr_rx"); end
      @(negedge clk);
      pin = pin + 32'd1 + 32'($urandom_range(0, 1000));
      @(posedge clk);
      checks++;
      if (scr_dec === cipher) begin failures++; $display("FAIL wrong PIN recovered the ciphertext"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

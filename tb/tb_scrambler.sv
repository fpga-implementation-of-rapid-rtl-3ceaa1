// tb_scrambler: checks that the scrambler XORs the reference scramble word
// for (PIN, serial, address) onto the ciphertext, that scr_tx is that word,
// and that changing the PIN or the address changes the scramble word.
module tb_scrambler;
  import mcs_pkg::*;
  import mcs_ref_pkg::*;

  localparam int unsigned AW = 8;

  logic                clk = 1'b0;
  logic [PIN_W-1:0]    pin;
  logic [SERIAL_W-1:0] serial_id;
  logic [AW-1:0]       addr;
  block_t              cin, scr_tx, scr_enc;
  int                  checks = 0, failures = 0;

  scrambler #(.ADDR_W(AW)) dut (.pin(pin), .serial_id(serial_id), .addr(addr), .cipher_in(cin),
                                .scr_tx(scr_tx), .scr_enc(scr_enc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t pat, prev;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      pin = $urandom; serial_id = $urandom; addr = AW'($urandom);
      cin = {$urandom, $urandom, $urandom, $urandom};
      pat = scramble_ref(pin, serial_id, addr);
      @(posedge clk);
      checks += 2;
      if (scr_tx !== pat)         begin failures++; $display("FAIL scr_tx %h exp %h", scr_tx, pat); end
      if (scr_enc !== (cin ^ pat)) begin failures++; $display("FAIL scr_enc %h", scr_enc); end
      // a wrong PIN (one bit off) and a neighbouring address must differ
      prev = scr_tx;
      @(negedge clk);
      pin = pin ^ (32'h1 << (i % 32));
      @(posedge clk);
      checks++;
      if (scr_tx === prev) begin failures++; $display("FAIL PIN change left scr_tx unchanged"); end
      prev = scr_tx;
      @(negedge clk);
      addr = addr + 1'b1;
      @(posedge clk);
      checks++;
      if (scr_tx === prev) begin failures++; $display("FAIL address change left scr_tx unchanged"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

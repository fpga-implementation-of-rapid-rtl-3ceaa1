// tb_aes_key_expand: checks the AES-128 key schedule against the FIPS-197
// appendix A.1 round keys and, for random keys, against the reference
// model's schedule (all 11 round keys).
module tb_aes_key_expand;
  import mcs_pkg::*;
  import aes_ref_pkg::*;

  logic         clk = 1'b0;
  block_t       key;
  round_keys_t  rk;
  int           checks = 0, failures = 0;

  aes_key_expand dut (.key(key), .round_keys(rk));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    logic [127:0] ref_rk [11];
    ref_init();
    @(negedge clk);
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    @(posedge clk);
    check("rk0",  rk[0],  128'h2b7e151628aed2a6abf7158809cf4f3c);
    check("rk1",  rk[1],  128'ha0fafe1788542cb123a339392a6c7605);
    check("rk2",  rk[2],  128'hf2c295f27a96b9435935807a7359f67f);
    check("rk10", rk[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      key = {$urandom, $urandom, $urandom, $urandom};
      expand(key, ref_rk);
      @(posedge clk);
      for (int r = 0; r <= 10; r++) check($sformatf("random rk%0d", r), rk[r], ref_rk[r]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

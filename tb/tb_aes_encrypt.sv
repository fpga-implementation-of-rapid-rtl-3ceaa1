// tb_aes_encrypt: self-checking test of the single-cycle AES-128 encryption
// unit. Checks the published FIPS-197 and SP 800-38A ECB example vectors,
// then random keys and blocks against the behavioural reference model. The
// unit is combinational; each vector is applied at a falling clock edge and
// checked at the next rising edge, i.e. within one clock cycle.
module tb_aes_encrypt;
  import aes_ref_pkg::*;

  logic         clk = 1'b0;
  logic [127:0] key, pt, ct;
  int           checks = 0, failures = 0;

  aes_encrypt dut (.key(key), .text_in(pt), .text_out(ct));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [127:0] k, input logic [127:0] p, input logic [127:0] exp);
    @(negedge clk);
    key = k; pt = p;
    @(posedge clk);
    checks++;
    if (ct !== exp) begin
      failures++;
      $display("FAIL key=%h pt=%h got=%h exp=%h", k, p, ct, exp);
    end
  endtask

  initial begin
    ref_init();
    // FIPS-197 appendix B and C.1
    apply(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
          128'h3925841d02dc09fbdc118597196a0b32);
    apply(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
          128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    // SP 800-38A F.1.1 ECB-AES128
    apply(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h6bc1bee22e409f96e93d7e117393172a,
          128'h3ad77bb40d7a3660a89ecaf32466ef97);
    apply(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
          128'hf5d3d58503b9699de785895a96fdbaaf);
    apply(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h30c81c46a35ce411e5fbc1191a0a52ef,
          128'h43b1cd7f598ece23881b00e3ed030688);
    apply(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'hf69f2445df4f9b17ad2b417be66c3710,
          128'h7b0c785e27e8ad3f8223207104725dd4);
    // the reference model must agree with the published vectors too
    checks++;
    if (encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++; $display("FAIL reference model");
    end
    // random keys and blocks, including the design's 8-bit zero-extended words
    for (int i = 0; i < 200; i++) begin
      logic [127:0] k, p;
      k = {$urandom, $urandom, $urandom, $urandom};
      p = (i % 2) ? {$urandom, $urandom, $urandom, $urandom} : {120'h0, 8'($urandom)};
      apply(k, p, encrypt(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

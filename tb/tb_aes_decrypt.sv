// tb_aes_decrypt: self-checking test of the single-cycle AES-128 decryption
// unit. Checks that the published FIPS-197 and SP 800-38A ciphertexts
// decrypt to their plaintexts, then random keys and ciphertexts against the
// behavioural reference model, and that decryption undoes the reference
// encryption. Inputs change at a falling edge and are checked at the next
// rising edge, i.e. within one clock cycle.
module tb_aes_decrypt;
  import aes_ref_pkg::*;

  logic         clk = 1'b0;
  logic [127:0] key, ct, pt;
  int           checks = 0, failures = 0;

  aes_decrypt dut (.key(key), .text_in(ct), .text_out(pt));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [127:0] k, input logic [127:0] c, input logic [127:0] exp);
    @(negedge clk);
    key = k; ct = c;
    @(posedge clk);
    checks++;
    if (pt !== exp) begin
      failures++;
      $display("FAIL key=%h ct=%h got=%h exp=%h", k, c, pt, exp);
    end
  endtask

  initial begin
    ref_init();
    apply(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32,
          128'h3243f6a8885a308d313198a2e0370734);
    apply(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a,
          128'h00112233445566778899aabbccddeeff);
    apply(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3ad77bb40d7a3660a89ecaf32466ef97,
          128'h6bc1bee22e409f96e93d7e117393172a);
    apply(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h7b0c785e27e8ad3f8223207104725dd4,
          128'hf69f2445df4f9b17ad2b417be66c3710);
    checks++;
    if (decrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a)
        !== 128'h00112233445566778899aabbccddeeff) begin
      failures++; $display("FAIL reference model");
    end
    for (int i = 0; i < 100; i++) begin
      logic [127:0] k, c;
      k = {$urandom, $urandom, $urandom, $urandom};
      c = {$urandom, $urandom, $urandom, $urandom};
      apply(k, c, decrypt(k, c));
    end
    // decryption undoes encryption (plaintexts as the CPU writes them)
    for (int i = 0; i < 100; i++) begin
      logic [127:0] k, p;
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {120'h0, 8'(i)};
      apply(k, encrypt(k, p), p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cpu_read_mux: checks the decrypt-enable selection (0: scrambled
// ciphertext, 1: plaintext), that the register only loads when `load` is
// high, that reset clears it, and that rdata is the low byte of the block.
module tb_cpu_read_mux;
  import mcs_pkg::*;

  logic                  clk = 1'b0, rst_n = 1'b0, load = 1'b0, decrypt_enable = 1'b0;
  block_t                scr_cipher, plain, rblock, expect_q;
  logic [CPU_DATA_W-1:0] rdata;
  int                    checks = 0, failures = 0;

  cpu_read_mux dut (.clk(clk), .rst_n(rst_n), .load(load), .decrypt_enable(decrypt_enable),
                    .scr_cipher(scr_cipher), .plain(plain), .rblock(rblock), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    scr_cipher = '1; plain = '1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (rblock !== '0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1'b1;
    expect_q = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load           = 1'($urandom);
      decrypt_enable = 1'($urandom);
      scr_cipher     = {$urandom, $urandom, $urandom, $urandom};
      plain          = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      if (load) expect_q = decrypt_enable ? plain : scr_cipher;
      #1;
      checks += 2;
      if (rblock !== expect_q)      begin failures++; $display("FAIL rblock %h exp %h", rblock, expect_q); end
      if (rdata !== expect_q[7:0])  begin failures++; $display("FAIL rdata"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

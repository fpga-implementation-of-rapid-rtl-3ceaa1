// tb_rng_keygen: checks the LFSR key generator. After reset the key is the
// seed; a cycle with `advance` high moves it exactly one LFSR step on the
// next rising edge, a cycle without holds it. Random advance patterns are
// compared with the reference LFSR, and 2000 successive keys must all be
// distinct and nonzero.
module tb_rng_keygen;
  import mcs_pkg::*;
  import mcs_ref_pkg::*;

  localparam block_t SEED = 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210;

  logic   clk = 1'b0, rst_n = 1'b0, advance = 1'b0;
  block_t key, model;
  int     checks = 0, failures = 0;
  bit     seen [block_t];

  rng_keygen #(.SEED(SEED)) dut (.clk(clk), .rst_n(rst_n), .advance(advance), .key(key));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (key !== model) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, key, model);
    end
  endtask

  initial begin
    model = SEED;
    repeat (2) @(posedge clk);
    #1 check("seed after reset");
    rst_n = 1'b1;
    // random advance pattern
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      advance = 1'($urandom);
      @(posedge clk);
      if (advance) model = lfsr_next(model);
      #1 check($sformatf("step %0d", i));
    end
    // run freely: every key distinct and nonzero
    @(negedge clk);
    advance = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      #1;
      checks++;
      if (key == '0 || seen.exists(key)) begin
        failures++;
        $display("FAIL repeated or zero key %h at %0d", key, i);
      end
      seen[key] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

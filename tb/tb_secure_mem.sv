// tb_secure_mem: writes random words to random addresses and reads them
// back, comparing with a shadow copy. Checks the read is asynchronous (data
// for the new address within the same cycle) and that a word written on a
// rising edge is visible right after that edge.
module tb_secure_mem;
  import mcs_pkg::*;

  localparam int unsigned AW = 6;

  logic          clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr, raddr;
  block_t        wdata, rdata;
  block_t        shadow [2**AW];
  bit            valid  [2**AW];
  int            checks = 0, failures = 0;

  secure_mem #(.ADDR_W(AW)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                                 .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**AW; i++) valid[i] = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we    = (i < 64) ? 1'b1 : 1'($urandom);
      waddr = (i < 64) ? AW'(i) : AW'($urandom);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      raddr = AW'($urandom);
      #1;
      if (valid[raddr]) begin
        checks++;
        if (rdata !== shadow[raddr]) begin
          failures++; $display("FAIL read %0d got %h exp %h", raddr, rdata, shadow[raddr]);
        end
      end
      @(posedge clk);
      if (we) begin shadow[waddr] = wdata; valid[waddr] = 1'b1; end
      #1 raddr = waddr;
      #1;
      if (we) begin
        checks++;
        if (rdata !== wdata) begin failures++; $display("FAIL write-then-read %0d", waddr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

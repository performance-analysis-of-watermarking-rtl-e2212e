// md5_core_tb: self-checking test of the 16-byte MD5 core.
// Hashes seven 16-byte messages (the all-zero block, a counting pattern, an
// ASCII string and four AES ciphertexts) and compares each digest with the
// value from an independent MD5 implementation. Also checks the 64-cycle
// latency and that the digest is held after done.
module md5_core_tb;
  import wm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [127:0] msg = '0;
  logic busy, done;
  logic [127:0] digest;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  md5_core dut (.*);

  localparam int N = 7;
  logic [127:0] v_msg [N] = '{
    128'h00000000000000000000000000000000,
    128'h00112233445566778899aabbccddeeff,
    128'h41434d452053696c69636f6e20496e63,   // "ACME Silicon Inc"
    128'h69c4e0d86a7b0430d8cdb78070b4c55a,
    128'h3925841d02dc09fbdc118597196a0b32,
    128'h6611ae36fc925862e13a638b4404d3f5,
    128'h66e94bd4ef8a2c3b884cfa59ca342b2e
  };
  logic [127:0] v_dig [N] = '{
    128'h4ae71336e44bf9bf79d2752e234818a5,
    128'h6e8311168ee16d6aa1aa48c64145003c,
    128'h0f8436dfde5f8c3d589ad841ec9ca7fd,
    128'hd7b4eb4c295978bc3462858d915c7417,
    128'hd6bbbed869c6987fb02d667a92acccf4,
    128'hd3d79b30514619e28f3c1dfc0c0b321d,
    128'h5003c085f176da047b93bc4410bf2d19
  };

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int v = 0; v < N; v++) begin
      int cycles;
      msg   <= v_msg[v];
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      msg   <= ~v_msg[v];    // the core must have latched the message
      cycles = 0;
      #1 check(busy == 1'b1, $sformatf("vector %0d: busy after start", v));
      while (!done) begin
        @(posedge clk);
        #1 cycles++;
      end
      check(cycles == 64, $sformatf("vector %0d: latency %0d, expected 64", v, cycles));
      check(digest == v_dig[v], $sformatf("vector %0d: digest %h, expected %h", v, digest, v_dig[v]));
      repeat (2) @(posedge clk);
      #1 check(digest == v_dig[v], $sformatf("vector %0d: digest held", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

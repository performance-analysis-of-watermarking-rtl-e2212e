// aes128_enc_tb: self-checking test of the iterative AES-128 encryptor.
// Encrypts four known blocks (the FIPS-197 Appendix C.1 example, the
// Appendix B example, an ASCII developer string and the all-zero block) and
// compares each ciphertext with the value from an independent AES
// implementation. Also checks the 10-cycle latency, that busy is high while
// working and that a start pulse during busy is ignored.
module aes128_enc_tb;
  import wm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [127:0] pt = '0, key = '0;
  logic busy, done;
  logic [127:0] ct;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes128_enc dut (.*);

  localparam int N = 4;
  logic [127:0] v_key [N] = '{
    128'h000102030405060708090a0b0c0d0e0f,
    128'h2b7e151628aed2a6abf7158809cf4f3c,
    128'h4950636f72654f776e65724b65793031,   // "IPcoreOwnerKey01"
    128'h0
  };
  logic [127:0] v_pt [N] = '{
    128'h00112233445566778899aabbccddeeff,
    128'h3243f6a8885a308d313198a2e0370734,
    128'h41434d452053696c69636f6e20496e63,   // "ACME Silicon Inc"
    128'h0
  };
  logic [127:0] v_ct [N] = '{
    128'h69c4e0d86a7b0430d8cdb78070b4c55a,
    128'h3925841d02dc09fbdc118597196a0b32,
    128'h6611ae36fc925862e13a638b4404d3f5,
    128'h66e94bd4ef8a2c3b884cfa59ca342b2e
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
      key   <= v_key[v];
      pt    <= v_pt[v];
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      // A second start while busy, with other data, must be ignored.
      if (v == 1) begin
        pt    <= ~v_pt[v];
        start <= 1'b1;
        @(posedge clk);
        start <= 1'b0;
        pt    <= v_pt[v];
        cycles = 1;
      end else begin
        cycles = 0;
      end
      #1 check(busy == 1'b1, $sformatf("vector %0d: busy after start", v));
      while (!done) begin
        @(posedge clk);
        #1 cycles++;
      end
      check(cycles == 10, $sformatf("vector %0d: latency %0d, expected 10", v, cycles));
      check(ct == v_ct[v], $sformatf("vector %0d: ct %h, expected %h", v, ct, v_ct[v]));
      check(busy == 1'b0, $sformatf("vector %0d: busy cleared with done", v));
      @(posedge clk);
      #1 check(ct == v_ct[v], $sformatf("vector %0d: ct held after done", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

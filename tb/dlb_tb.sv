// dlb_tb: self-checking test of the digital logic block.
// The reference is written differently from the block: signature bit j of an
// L-bit signature is the XOR of every digest bit i with i mod L == j. Checks
// four digests with known folds and 200 random digests at all four lengths,
// and that bits above the selected length are zero.
module dlb_tb;
  import wm_pkg::*;

  logic [127:0] digest;
  sig_mode_e mode;
  logic [SIG_MAX_BITS-1:0] sig;
  int checks = 0, failures = 0;

  dlb dut (.*);

  function automatic logic [63:0] ref_fold(logic [127:0] d, int unsigned len);
    logic [63:0] r;
    r = '0;
    for (int i = 0; i < 128; i++) r[i % len] ^= d[i];
    return r;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam sig_mode_e MODES [4] = '{SIG8, SIG16, SIG32, SIG64};

  // Digest of MD5(AES(key 000102..0f, pt 00112233..ff)) and its known folds.
  localparam logic [127:0] D0 = 128'hd7b4eb4c295978bc3462858d915c7417;
  localparam logic [63:0]  F0 [4] = '{64'h80, 64'h39b9, 64'h5bd3626a, 64'he3d66ec1b8050cab};

  initial begin
    digest = D0;
    for (int m = 0; m < 4; m++) begin
      mode = MODES[m];
      #1 check(sig == F0[m], $sformatf("known digest, %0d bits: %h", sig_bits(mode), sig));
    end
    for (int t = 0; t < 200; t++) begin
      digest = {$urandom, $urandom, $urandom, $urandom};
      for (int m = 0; m < 4; m++) begin
        int unsigned len;
        mode = MODES[m];
        len  = sig_bits(mode);
        #1 check(sig == ref_fold(digest, len),
                 $sformatf("random %0d, %0d bits: %h expected %h", t, len, sig, ref_fold(digest, len)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

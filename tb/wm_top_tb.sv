// wm_top_tb: end-to-end test of the two-level watermark generator at its
// default (and only) configuration.
// For four developer strings and keys, and for each signature length
// (8/16/32/64 bits), it starts the generator, waits for the signature and
// compares it with the value from an independent AES-128 + MD5 + XOR-fold
// model, checks the 76-cycle latency, then streams delay digits of
// non-critical nets and checks every rewritten digit against a reference of
// the threshold rule. It also sends a start while busy (must be ignored) and
// digits before the signature is ready (must pass through), and counts how
// often each mechanism happened; one that never happened is a failure.
module wm_top_tb;
  import wm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [127:0] message = '0, key = '0;
  sig_mode_e mode = SIG64;
  logic busy, sig_valid;
  logic [SIG_MAX_BITS-1:0] signature;
  logic dly_valid = 1'b0;
  logic [3:0] dly_digit = '0;
  logic out_valid;
  logic [3:0] out_digit;
  dw_case_e out_kind;
  logic [4:0] groups_left;
  logic wm_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wm_top dut (.*);

  localparam int N = 4;
  logic [127:0] v_key [N] = '{
    128'h000102030405060708090a0b0c0d0e0f,
    128'h2b7e151628aed2a6abf7158809cf4f3c,
    128'h4950636f72654f776e65724b65793031,   // "IPcoreOwnerKey01"
    128'h0
  };
  logic [127:0] v_msg [N] = '{
    128'h00112233445566778899aabbccddeeff,
    128'h3243f6a8885a308d313198a2e0370734,
    128'h41434d452053696c69636f6e20496e63,   // "ACME Silicon Inc"
    128'h0
  };
  // Expected signatures [vector][8,16,32,64 bits].
  logic [63:0] v_sig [N][4] = '{
    '{64'h80, 64'h39b9, 64'h5bd3626a, 64'he3d66ec1b8050cab},
    '{64'hc4, 64'h11d5, 64'h9dfc8c29, 64'h6696d8a2fb6a548b},
    '{64'h39, 64'hac95, 64'h01a6ad33, 64'h5ceb86cc5d4d2bff},
    '{64'hc4, 64'h4185, 64'hca598bdc, 64'h2b907cc1e1c9f71d}
  };
  localparam sig_mode_e MODES [4] = '{SIG8, SIG16, SIG32, SIG64};
  localparam int LENS [4] = '{8, 16, 32, 64};

  // Mechanism counters.
  int n_mode [4] = '{0, 0, 0, 0};
  int n_case1 = 0, n_case2 = 0, n_keep = 0, n_pass = 0;
  int n_start_ignored = 0, n_early_digit = 0;

  // Latency monitor. Stimulus changes on the falling edge, so every rising
  // edge samples settled inputs. t_start is the edge that accepts start;
  // sig_valid set by edge X is first seen here at edge X+1.
  int cyc = 0, t_start = 0, latency = 0;
  logic sv_d = 1'b0;
  always @(posedge clk) begin
    cyc  <= cyc + 1;
    sv_d <= sig_valid;
    if (start && !busy && rst_n) t_start <= cyc;
    if (sig_valid && !sv_d) latency <= cyc - 1 - t_start;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int ref_group(logic [63:0] s, int len, int k);
    int g, v, pos;
    g = (len + 2) / 3;
    v = 0;
    for (int b = 2; b >= 0; b--) begin
      pos = 3 * (g - 1 - k) + b;
      v = v * 2 + ((pos < len) ? int'(s[pos]) : 0);
    end
    return v;
  endfunction

  // Send one digit and check the digit that comes back.
  task automatic send_digit(int d, int exp_d, dw_case_e exp_k, string what);
    @(negedge clk);
    dly_valid <= 1'b1;
    dly_digit <= 4'(d);
    @(negedge clk);
    dly_valid <= 1'b0;
    check(out_valid == 1'b1, {what, ": out_valid"});
    check(out_digit == 4'(exp_d) && out_kind == exp_k,
          $sformatf("%s: Td=%0d -> %0d/%s, expected %0d/%s",
                    what, d, out_digit, out_kind.name(), exp_d, exp_k.name()));
    case (out_kind)
      DW_CASE1: n_case1++;
      DW_CASE2: n_case2++;
      DW_KEEP:  n_keep++;
      default:  n_pass++;
    endcase
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // Before any signature exists digits pass through unchanged.
    send_digit(7, 7, DW_PASS, "digit before any signature");
    if (out_kind == DW_PASS) n_early_digit++;

    for (int v = 0; v < N; v++) begin
      for (int m = 0; m < 4; m++) begin
        int len, g, cycles;
        logic [63:0] s;
        len = LENS[m];
        g   = (len + 2) / 3;
        s   = v_sig[v][m];
        @(negedge clk);
        message <= v_msg[v];
        key     <= v_key[v];
        mode    <= MODES[m];
        start   <= 1'b1;
        @(negedge clk);
        start   <= 1'b0;
        message <= ~v_msg[v];
        mode    <= MODES[(m + 1) % 4];
        @(negedge clk);
        check(busy && !sig_valid, "busy and no signature while generating");
        // A start in the middle of the run must be ignored.
        if (m == 1) begin
          start <= 1'b1;
          @(negedge clk);
          start <= 1'b0;
          n_start_ignored++;
        end
        while (!sig_valid) @(negedge clk);
        @(negedge clk);
        cycles = latency;
        check(cycles == 76, $sformatf("vector %0d, %0d bits: latency %0d, expected 76", v, len, cycles));
        check(signature == s, $sformatf("vector %0d, %0d bits: signature %h, expected %h",
                                        v, len, signature, s));
        if (signature == s) n_mode[m]++;
        @(negedge clk);
        check(groups_left == 5'(g), $sformatf("groups to embed %0d, expected %0d", groups_left, g));
        check(!busy, "idle once the signature is ready");
        for (int k = 0; k < g + 2; k++) begin
          int d, w, exp_d;
          dw_case_e exp_k;
          d = int'($urandom_range(0, 9));
          if (k < g) begin
            w = ref_group(s, len, k);
            if ((d - w <= 4) && (w - d <= 4)) begin
              exp_d = w; exp_k = DW_CASE1;
            end else if (d > w) begin
              exp_d = d - w; exp_k = DW_CASE2;
            end else begin
              exp_d = d; exp_k = DW_KEEP;
            end
          end else begin
            exp_d = d; exp_k = DW_PASS;
          end
          send_digit(d, exp_d, exp_k, $sformatf("vector %0d, %0d bits, net %0d", v, len, k));
        end
        check(wm_done, "all groups embedded");
      end
    end

    $display("mechanisms: sig8=%0d sig16=%0d sig32=%0d sig64=%0d case1=%0d case2=%0d keep=%0d pass=%0d start_ignored=%0d early_digit=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_case1, n_case2, n_keep, n_pass,
             n_start_ignored, n_early_digit);
    for (int m = 0; m < 4; m++) check(n_mode[m] > 0, $sformatf("signature length %0d never produced", LENS[m]));
    check(n_case1 > 0, "case 1 never happened");
    check(n_case2 > 0, "case 2 never happened");
    check(n_keep > 0,  "no-rule case never happened");
    check(n_pass > 0,  "pass-through never happened");
    check(n_start_ignored > 0, "start while busy never happened");
    check(n_early_digit > 0, "digit before signature never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

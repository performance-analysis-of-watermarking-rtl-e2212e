// delay_wm_tb: self-checking test of the delay-digit watermark encoder.
// For each signature length it loads random signatures and streams random
// delay digits (0..9), with idle cycles in between, through the block. The
// expected digit is computed here from the signature bits directly: group k
// counted from the most significant end of the zero-extended signature, and
// the threshold rule written with signed integers. Checks every output digit
// and rule, the number of groups, the done flag and the pass-through after
// the last group, and counts how often each rule fired.
module delay_wm_tb;
  import wm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0;
  logic [SIG_MAX_BITS-1:0] sig = '0;
  sig_mode_e mode = SIG64;
  logic in_valid = 1'b0;
  logic [3:0] td = '0;
  logic out_valid;
  logic [3:0] td_out;
  dw_case_e kind;
  logic [4:0] groups_left;
  logic done;
  int checks = 0, failures = 0;
  int n_case1 = 0, n_case2 = 0, n_keep = 0, n_pass = 0;

  always #5 clk = ~clk;

  delay_wm dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference: value of group k (0 = first) of an L-bit signature.
  function automatic int ref_group(logic [63:0] s, int len, int k);
    int g, v;
    g = (len + 2) / 3;
    v = 0;
    for (int b = 2; b >= 0; b--) begin
      int pos = 3 * (g - 1 - k) + b;     // bit position in the padded number
      v = v * 2 + ((pos < len) ? int'(s[pos]) : 0);
    end
    return v;
  endfunction

  localparam sig_mode_e MODES [4] = '{SIG8, SIG16, SIG32, SIG64};
  localparam int LENS [4] = '{8, 16, 32, 64};

  // Fixed cases: a digit and symbol pair for every rule.
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1 check(done == 1'b1, "done after reset (nothing loaded)");
    for (int rep = 0; rep < 12; rep++) begin
      for (int m = 0; m < 4; m++) begin
        int len, g;
        logic [63:0] s;
        len = LENS[m];
        g   = (len + 2) / 3;
        s   = {$urandom, $urandom};
        if (rep == 0) s = 64'hFFFF_FFFF_FFFF_FFFF;      // all symbols 7: forces the no-rule case
        @(posedge clk);
        load <= 1'b1;
        sig  <= s;
        mode <= MODES[m];
        @(posedge clk);
        load <= 1'b0;
        #1 check(groups_left == 5'(g), $sformatf("groups after load, %0d bits: %0d", len, groups_left));
        check(done == 1'b0, "done low after load");
        for (int k = 0; k < g + 2; k++) begin
          int d, w, exp_d;
          dw_case_e exp_k;
          d = (rep == 0) ? (k % 3) : int'($urandom_range(0, 9));
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
          @(posedge clk);
          in_valid <= 1'b1;
          td       <= 4'(d);
          @(posedge clk);
          in_valid <= 1'b0;
          if ($urandom_range(0, 1) == 1) @(posedge clk);    // idle gap
          #1;
          check(td_out == 4'(exp_d) && kind == exp_k,
                $sformatf("%0d bits, group %0d: Td=%0d Tw=%0d -> %0d/%s, expected %0d/%s",
                          len, k, d, (k < g) ? ref_group(s, len, k) : -1,
                          td_out, kind.name(), exp_d, exp_k.name()));
          case (kind)
            DW_CASE1: n_case1++;
            DW_CASE2: n_case2++;
            DW_KEEP:  n_keep++;
            default:  n_pass++;
          endcase
          check(done == (k >= g - 1), $sformatf("done flag after group %0d of %0d", k, g));
        end
      end
    end
    $display("rules: case1=%0d case2=%0d keep=%0d pass=%0d", n_case1, n_case2, n_keep, n_pass);
    check(n_case1 > 0 && n_case2 > 0 && n_keep > 0 && n_pass > 0, "every rule exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // out_valid must follow in_valid by exactly one cycle.
  logic in_valid_d = 1'b0;
  always @(posedge clk) begin
    in_valid_d <= in_valid && !load;
    if (rst_n) begin
      checks++;
      if (out_valid !== in_valid_d) begin
        failures++;
        $display("FAIL: out_valid does not follow in_valid");
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

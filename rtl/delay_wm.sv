// delay_wm: netlist-level watermark encoder that hides the signature in the
// last decimal digit of net delays.
//
// The second watermark level of the method works on the synthesized netlist.
// The signature is cut into groups of three bits; each group's value Tw
// (0..7) is embedded in one non-critical net by rewriting Td, the last digit
// of that net's delay, with a threshold Th = floor((Tmin + Tmax) / 2) = 4
// (Tmin = 0, Tmax = 9):
//   |Td - Tw| <= Th              -> new digit Tw       (case 1)
//   |Td - Tw| >  Th and Td > Tw  -> new digit Td - Tw  (case 2)
// The method gives no rule for |Td - Tw| > Th with Td < Tw (possible only for
// Tw = 5..7, Td < Tw - 4); here that digit is kept and the group counts as
// used. This block streams the delay digits of the non-critical nets, one per
// cycle; selecting those nets is left to the tool that feeds it.
//
// Group order (this design's choice): the signature of L bits is read as a
// number, zero-extended on the left to 3*ceil(L/3) bits and cut into groups
// from the most significant end. 8/16/32/64-bit signatures give 3/6/11/22
// groups.
//
// Interface:
//   load       one-cycle pulse; samples sig and mode and restarts the groups
//   in_valid   td is the last delay digit (0..9) of the next non-critical net;
//              ignored in a load cycle
//   out_valid  one cycle after in_valid; td_out is the rewritten digit and
//              kind says which rule applied (DW_PASS once all groups are in)
//   groups_left  groups still to embed; done is high when it is zero
module delay_wm
  import wm_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic [SIG_MAX_BITS-1:0] sig,
  input  sig_mode_e               mode,
  input  logic                    in_valid,
  input  logic [3:0]              td,
  output logic                    out_valid,
  output logic [3:0]              td_out,
  output dw_case_e                kind,
  output logic [4:0]              groups_left,
  output logic                    done
);

  localparam int unsigned PAD_BITS = GROUP_BITS * MAX_GROUPS;   // 66

  logic [PAD_BITS-1:0] sig_q;
  logic [4:0]          left_q;
  logic [2:0]          tw;
  dw_result_t          res;
  logic [SIG_MAX_BITS-1:0] len_mask;

  assign len_mask = (mode == SIG64) ? '1
                  : (SIG_MAX_BITS'(1) << sig_bits(mode)) - SIG_MAX_BITS'(1);

  // Group to embed next: the highest group still left.
  always_comb begin
    logic [6:0] base;
    base = (left_q == '0) ? 7'd0 : 7'(GROUP_BITS) * (7'(left_q) - 7'd1);
    tw   = sig_q[base +: 3];
    res = delay_rule(td, tw);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig_q     <= '0;
      left_q    <= '0;
      out_valid <= 1'b0;
      td_out    <= '0;
      kind      <= DW_PASS;
    end else begin
      out_valid <= in_valid && !load;
      if (load) begin
        // Mask to the selected length so that unused upper bits read as zero.
        sig_q  <= PAD_BITS'(sig & len_mask);
        left_q <= 5'(sig_groups(mode));
      end else if (in_valid) begin
        if (left_q != '0) begin
          td_out <= res.digit;
          kind   <= res.kind;
          left_q <= left_q - 5'd1;
        end else begin
          td_out <= td;
          kind   <= DW_PASS;
        end
      end
    end
  end

  assign groups_left = left_q;
  assign done        = (left_q == '0);

  // A delay digit is a decimal digit.
  a_td_decimal: assert property (@(posedge clk) in_valid |-> td <= 4'd9);

endmodule

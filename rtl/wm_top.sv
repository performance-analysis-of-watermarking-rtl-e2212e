// wm_top: two-level watermark generator. It turns the IP developer's
// identification string into a signature and embeds that signature in the
// delay digits of a netlist's non-critical nets.
//
// Chain (signature generation): message --AES-128(key)--> ciphertext
// --MD5--> 128-bit digest --dlb--> 8/16/32/64-bit signature. The signature is
// then loaded into delay_wm, which rewrites the last delay digit of each
// non-critical net streamed through it, three signature bits per net.
// The order of the stages follows the method; the handshake between them
// (each stage's done pulse starts the next) is this design's choice.
//
// Interface:
//   start            one-cycle pulse, samples message, key and mode; ignored
//                    while a signature is being generated
//   busy             high while the AES or MD5 stage is working
//   sig_valid        high once a signature is ready (cleared by start)
//   signature        the signature, in the low bits chosen by mode
//   dly_valid/dly_digit      stream of delay last digits (0..9)
//   out_valid/out_digit/out_kind   rewritten digits, one cycle later
//   groups_left, wm_done     progress of the delay-level embedding
// Timing: sig_valid rises 10 (AES) + 1 (the AES done pulse starts MD5)
// + 64 (MD5) + 1 (signature register) = 76 cycles after start; the signature is loaded into delay_wm in that same
// cycle, so the first digit to carry a group may be sent one cycle after
// sig_valid rises. A digit sent in the load cycle is dropped; digits sent
// before it pass through unchanged (out_kind = DW_PASS).
module wm_top
  import wm_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [127:0]            message,
  input  logic [127:0]            key,
  input  sig_mode_e               mode,
  output logic                    busy,
  output logic                    sig_valid,
  output logic [SIG_MAX_BITS-1:0] signature,
  input  logic                    dly_valid,
  input  logic [3:0]              dly_digit,
  output logic                    out_valid,
  output logic [3:0]              out_digit,
  output dw_case_e                out_kind,
  output logic [4:0]              groups_left,
  output logic                    wm_done
);

  logic         aes_busy, aes_done;
  logic [127:0] ct;
  logic         md5_busy, md5_done;
  logic [127:0] digest;
  logic [SIG_MAX_BITS-1:0] sig_c;
  sig_mode_e    mode_q;
  logic         go;
  logic         load_q;

  assign go = start && !busy;

  aes128_enc u_aes (
    .clk   (clk),
    .rst_n (rst_n),
    .start (go),
    .pt    (message),
    .key   (key),
    .busy  (aes_busy),
    .done  (aes_done),
    .ct    (ct)
  );

  md5_core u_md5 (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (aes_done),
    .msg    (ct),
    .busy   (md5_busy),
    .done   (md5_done),
    .digest (digest)
  );

  dlb u_dlb (
    .digest (digest),
    .mode   (mode_q),
    .sig    (sig_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q    <= SIG64;
      signature <= '0;
      sig_valid <= 1'b0;
      load_q    <= 1'b0;
    end else begin
      load_q <= md5_done;
      if (go) begin
        mode_q    <= mode;
        sig_valid <= 1'b0;
      end
      if (md5_done) begin
        signature <= sig_c;
        sig_valid <= 1'b1;
      end
    end
  end

  // aes_done is the cycle between the two stages: neither busy flag is high.
  assign busy = aes_busy || aes_done || md5_busy || md5_done;

  delay_wm u_dwm (
    .clk         (clk),
    .rst_n       (rst_n),
    .load        (load_q),
    .sig         (signature),
    .mode        (mode_q),
    .in_valid    (dly_valid),
    .td          (dly_digit),
    .out_valid   (out_valid),
    .td_out      (out_digit),
    .kind        (out_kind),
    .groups_left (groups_left),
    .done        (wm_done)
  );

endmodule

// aes128_enc: AES-128 block encryption, one round per clock cycle.
//
// First stage of the signature generator: the 128-bit string that names the
// IP core developer is encrypted under a 128-bit key. The cipher is the
// standard AES-128 of FIPS-197; the watermarking method names it but leaves
// its implementation open, so the iterative architecture below is this
// design's own choice.
//
// How it works: a start pulse loads state = plaintext ^ key (the initial
// AddRoundKey) and the key into the round-key register. In each of the next
// ten cycles the next round key is derived from the current one and one round
// (SubBytes, ShiftRows, MixColumns except in round 10, AddRoundKey) is applied.
// The S-boxes are computed from the GF(2^8) inverse (see wm_pkg), there is no
// stored table.
//
// Interface: byte 0 of a block is in bits [127:120].
//   start  one-cycle pulse, samples pt and key; ignored while busy
//   busy   high from the cycle after start until the result is ready
//   done   one-cycle pulse, ct valid from then until the next start
// Timing: done rises 10 cycles after the start cycle (latency 10 clocks).
module aes128_enc
  import wm_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] pt,
  input  logic [127:0] key,
  output logic         busy,
  output logic         done,
  output logic [127:0] ct
);

  localparam int unsigned ROUNDS = 10;

  logic [127:0] state_q;
  logic [127:0] rk_q;
  logic [7:0]   rcon_q;
  logic [3:0]   round_q;   // number of the round applied in this cycle

  logic [127:0] rk_next;
  logic [127:0] round_out;

  always_comb begin
    logic [127:0] s;
    rk_next = next_round_key(rk_q, rcon_q);
    s = shift_rows(sub_bytes(state_q));
    if (round_q != 4'(ROUNDS)) s = mix_columns(s);
    round_out = s ^ rk_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      rk_q    <= '0;
      rcon_q  <= 8'h01;
      round_q <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state_q <= pt ^ key;
          rk_q    <= key;
          rcon_q  <= 8'h01;
          round_q <= 4'd1;
          busy    <= 1'b1;
        end
      end else begin
        state_q <= round_out;
        rk_q    <= rk_next;
        rcon_q  <= xtime(rcon_q);
        round_q <= round_q + 4'd1;
        if (round_q == 4'(ROUNDS)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign ct = state_q;

endmodule

// md5_core: MD5 digest of a 16-byte message, one MD5 step per clock cycle.
//
// Second stage of the signature generator: the AES ciphertext is hashed to a
// 128-bit message digest, whose bits become the watermark signature. MD5
// itself is the standard one of RFC 1321; the method only names it. This
// core is restricted to what the generator needs: a message of exactly 16
// bytes, which with MD5 padding (0x80, zeros, 64-bit length 128) fills a
// single 512-bit block. The padding is therefore fixed wiring, not logic.
//
// How it works: start loads A..D with the MD5 initial values and latches the
// message. Steps 0..63 run one per cycle (F/G/H/I by round, message word g,
// constant K[i], left rotate s[i]). After step 63 the initial values are
// added back and the digest is presented.
//
// Interface: msg byte 0 in bits [127:120]; digest byte 0 (the first byte of
// the usual hex representation) in bits [127:120].
//   start  one-cycle pulse, samples msg; ignored while busy
//   done   one-cycle pulse, digest valid from then until the next start
// Timing: done rises 64 cycles after the start cycle.
module md5_core
  import wm_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] msg,
  output logic         busy,
  output logic         done,
  output logic [127:0] digest
);

  logic [31:0] a_q, b_q, c_q, d_q;
  logic [5:0]  step_q;
  logic [31:0] m_q [4];      // message words 0..3, little-endian

  logic [31:0] f;
  logic [31:0] mw;
  logic [31:0] sum;
  logic [3:0]  g;

  // Message word g of the single padded block.
  always_comb begin
    g = md5_word_index(step_q);
    unique case (g)
      4'd0, 4'd1, 4'd2, 4'd3: mw = m_q[g[1:0]];
      4'd4:                   mw = 32'h0000_0080;   // padding byte 0x80
      4'd14:                  mw = 32'd128;         // length in bits, low word
      default:                mw = 32'h0000_0000;
    endcase
  end

  always_comb begin
    unique case (step_q[5:4])
      2'd0:    f = (b_q & c_q) | (~b_q & d_q);
      2'd1:    f = (d_q & b_q) | (~d_q & c_q);
      2'd2:    f = b_q ^ c_q ^ d_q;
      default: f = c_q ^ (b_q | ~d_q);
    endcase
    sum = f + a_q + MD5_K[step_q] + mw;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q    <= MD5_A0;
      b_q    <= MD5_B0;
      c_q    <= MD5_C0;
      d_q    <= MD5_D0;
      step_q <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      for (int i = 0; i < 4; i++) m_q[i] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          a_q    <= MD5_A0;
          b_q    <= MD5_B0;
          c_q    <= MD5_C0;
          d_q    <= MD5_D0;
          step_q <= '0;
          busy   <= 1'b1;
          for (int i = 0; i < 4; i++) m_q[i] <= bswap32(msg[127-32*i -: 32]);
        end
      end else begin
        a_q    <= d_q;
        b_q    <= b_q + rotl32(sum, md5_shift(step_q[5:4], step_q[1:0]));
        c_q    <= b_q;
        d_q    <= c_q;
        step_q <= step_q + 6'd1;
        if (step_q == 6'd63) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // Add the initial values back; each word is emitted least significant byte
  // first, as MD5 specifies.
  assign digest = {bswap32(a_q + MD5_A0), bswap32(b_q + MD5_B0),
                   bswap32(c_q + MD5_C0), bswap32(d_q + MD5_D0)};

endmodule

// dlb: digital logic block that cuts the 128-bit MD5 digest down to an
// 8, 16, 32 or 64 bit watermark signature.
//
// The watermarking method asks for a block that produces the required
// 8/16/32/64 signature bits from the 128 digest bits, without saying how.
// This design folds the digest with XOR: the 128 bits are split into two
// halves that are XORed to 64 bits, those into 32, then 16, then 8, and the
// fold matching the selected length is output. Every digest bit therefore
// influences the signature at every length.
//
// Interface: purely combinational.
//   digest  128-bit MD5 digest
//   mode    SIG8 / SIG16 / SIG32 / SIG64
//   sig     signature in the low sig_bits(mode) bits, upper bits zero
module dlb
  import wm_pkg::*;
(
  input  logic [127:0]            digest,
  input  sig_mode_e               mode,
  output logic [SIG_MAX_BITS-1:0] sig
);

  logic [63:0] f64;
  logic [31:0] f32;
  logic [15:0] f16;
  logic [7:0]  f8;

  always_comb begin
    f64 = digest[127:64] ^ digest[63:0];
    f32 = f64[63:32] ^ f64[31:0];
    f16 = f32[31:16] ^ f32[15:0];
    f8  = f16[15:8] ^ f16[7:0];
    unique case (mode)
      SIG8:    sig = {56'd0, f8};
      SIG16:   sig = {48'd0, f16};
      SIG32:   sig = {32'd0, f32};
      default: sig = f64;
    endcase
  end

endmodule

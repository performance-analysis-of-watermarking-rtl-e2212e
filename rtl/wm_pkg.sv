// wm_pkg: types, constants and pure functions shared by the watermark
// signature generator and the delay-digit watermark encoder.
//
// It holds
//   * sig_mode_e, the signature length selector (8, 16, 32 or 64 bits),
//   * the AES-128 byte-level functions (S-box, xtime, SubBytes, ShiftRows,
//     MixColumns, one key-expansion step) as defined by FIPS-197,
//   * the MD5 round constants and shift amounts as defined by RFC 1321,
//   * the threshold rule that rewrites the last digit of a net delay.
//
// The choice of AES-128 and MD5 and the delay-digit rule follow the
// watermarking method this RTL implements; how they are coded (an S-box
// computed from the GF(2^8) inverse rather than stored, a 128-bit state
// with byte 0 in bits [127:120]) is this design's own choice.
package wm_pkg;

  // ---------------------------------------------------------------------
  // Signature length
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {
    SIG8  = 2'd0,
    SIG16 = 2'd1,
    SIG32 = 2'd2,
    SIG64 = 2'd3
  } sig_mode_e;

  localparam int unsigned SIG_MAX_BITS = 64;
  localparam int unsigned GROUP_BITS   = 3;   // watermark bits per delay symbol
  // Largest number of 3-bit groups a signature can have: ceil(64/3) = 22.
  localparam int unsigned MAX_GROUPS   = (SIG_MAX_BITS + GROUP_BITS - 1) / GROUP_BITS;

  function automatic int unsigned sig_bits(sig_mode_e m);
    unique case (m)
      SIG8:    return 8;
      SIG16:   return 16;
      SIG32:   return 32;
      default: return 64;
    endcase
  endfunction

  // ceil(sig_bits / 3): number of delay symbols a signature fills.
  function automatic int unsigned sig_groups(sig_mode_e m);
    unique case (m)
      SIG8:    return 3;
      SIG16:   return 6;
      SIG32:   return 11;
      default: return 22;
    endcase
  endfunction

  // ---------------------------------------------------------------------
  // Delay-digit rule
  //   Th = floor((Tmin + Tmax) / 2), Tmin = 0, Tmax = 9, so Th = 4.
  //   |Td - Tw| <= Th          -> digit becomes Tw          (case 1)
  //   |Td - Tw| >  Th, Td > Tw -> digit becomes Td - Tw     (case 2)
  //   |Td - Tw| >  Th, Td < Tw -> digit kept                (no rule given)
  // ---------------------------------------------------------------------
  localparam int unsigned T_MIN = 0;
  localparam int unsigned T_MAX = 9;
  localparam int unsigned T_TH  = (T_MIN + T_MAX) / 2;

  typedef enum logic [1:0] {
    DW_CASE1 = 2'd0,   // digit replaced by the watermark symbol
    DW_CASE2 = 2'd1,   // digit replaced by digit minus symbol
    DW_KEEP  = 2'd2,   // symbol consumed, digit left as it was
    DW_PASS  = 2'd3    // every symbol already embedded, digit passed through
  } dw_case_e;

  typedef struct packed {
    logic [3:0] digit;
    dw_case_e   kind;
  } dw_result_t;

  function automatic dw_result_t delay_rule(logic [3:0] td, logic [2:0] tw);
    dw_result_t r;
    logic [3:0] w;
    logic [3:0] diff;
    w    = {1'b0, tw};
    diff = (td >= w) ? td - w : w - td;
    if (diff <= 4'(T_TH)) begin
      r.digit = w;
      r.kind  = DW_CASE1;
    end else if (td > w) begin
      r.digit = td - w;
      r.kind  = DW_CASE2;
    end else begin
      r.digit = td;
      r.kind  = DW_KEEP;
    end
    return r;
  endfunction

  // ---------------------------------------------------------------------
  // AES-128 (FIPS-197). A 128-bit block holds byte i in bits
  // [127-8i -: 8]; byte i sits in row i%4, column i/4 of the state.
  // ---------------------------------------------------------------------
  function automatic logic [7:0] xtime(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p;
    logic [7:0] x;
    p = 8'h00;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as x^254 (0 maps to 0), then the affine map.
  function automatic logic [7:0] sbox(logic [7:0] x);
    logic [7:0] sq;
    logic [7:0] inv;
    logic [7:0] b;
    sq  = gf_mul(x, x);          // x^2
    inv = sq;
    for (int i = 2; i < 8; i++) begin
      sq  = gf_mul(sq, sq);      // x^(2^i)
      inv = gf_mul(inv, sq);
    end
    b = inv;
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]}
             ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  function automatic logic [7:0] get_byte(logic [127:0] s, int unsigned i);
    return s[127-8*i -: 8];
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] s);
    logic [127:0] o;
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = sbox(s[127-8*i -: 8]);
    return o;
  endfunction

  // Row r is rotated left by r columns.
  function automatic logic [127:0] shift_rows(logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = s[127-8*(4*((c+r)%4)+r) -: 8];
    return o;
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] s);
    logic [127:0] o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = s[127-32*c -: 8];
      a1 = s[119-32*c -: 8];
      a2 = s[111-32*c -: 8];
      a3 = s[103-32*c -: 8];
      o[127-32*c -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      o[119-32*c -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      o[111-32*c -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      o[103-32*c -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  // One step of the AES-128 key schedule: round key i from round key i-1.
  function automatic logic [127:0] next_round_key(logic [127:0] k, logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3, t;
    w0 = k[127:96];
    w1 = k[95:64];
    w2 = k[63:32];
    w3 = k[31:0];
    t  = {sbox(w3[23:16]) ^ rcon, sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // ---------------------------------------------------------------------
  // MD5 (RFC 1321)
  // K[i] = floor(|sin(i+1)| * 2^32), i = 0..63.
  // ---------------------------------------------------------------------
  localparam logic [31:0] MD5_K [64] = '{
    32'hd76aa478, 32'he8c7b756, 32'h242070db, 32'hc1bdceee,
    32'hf57c0faf, 32'h4787c62a, 32'ha8304613, 32'hfd469501,
    32'h698098d8, 32'h8b44f7af, 32'hffff5bb1, 32'h895cd7be,
    32'h6b901122, 32'hfd987193, 32'ha679438e, 32'h49b40821,
    32'hf61e2562, 32'hc040b340, 32'h265e5a51, 32'he9b6c7aa,
    32'hd62f105d, 32'h02441453, 32'hd8a1e681, 32'he7d3fbc8,
    32'h21e1cde6, 32'hc33707d6, 32'hf4d50d87, 32'h455a14ed,
    32'ha9e3e905, 32'hfcefa3f8, 32'h676f02d9, 32'h8d2a4c8a,
    32'hfffa3942, 32'h8771f681, 32'h6d9d6122, 32'hfde5380c,
    32'ha4beea44, 32'h4bdecfa9, 32'hf6bb4b60, 32'hbebfbc70,
    32'h289b7ec6, 32'heaa127fa, 32'hd4ef3085, 32'h04881d05,
    32'hd9d4d039, 32'he6db99e5, 32'h1fa27cf8, 32'hc4ac5665,
    32'hf4292244, 32'h432aff97, 32'hab9423a7, 32'hfc93a039,
    32'h655b59c3, 32'h8f0ccc92, 32'hffeff47d, 32'h85845dd1,
    32'h6fa87e4f, 32'hfe2ce6e0, 32'ha3014314, 32'h4e0811a1,
    32'hf7537e82, 32'hbd3af235, 32'h2ad7d2bb, 32'heb86d391
  };

  localparam logic [31:0] MD5_A0 = 32'h67452301;
  localparam logic [31:0] MD5_B0 = 32'hefcdab89;
  localparam logic [31:0] MD5_C0 = 32'h98badcfe;
  localparam logic [31:0] MD5_D0 = 32'h10325476;

  // Left-rotate amount of step i: four per round, repeated four times.
  function automatic logic [4:0] md5_shift(logic [1:0] round, logic [1:0] pos);
    unique case ({round, pos})
      4'b00_00: return 5'd7;   4'b00_01: return 5'd12;
      4'b00_10: return 5'd17;  4'b00_11: return 5'd22;
      4'b01_00: return 5'd5;   4'b01_01: return 5'd9;
      4'b01_10: return 5'd14;  4'b01_11: return 5'd20;
      4'b10_00: return 5'd4;   4'b10_01: return 5'd11;
      4'b10_10: return 5'd16;  4'b10_11: return 5'd23;
      4'b11_00: return 5'd6;   4'b11_01: return 5'd10;
      4'b11_10: return 5'd15;  default:  return 5'd21;
    endcase
  endfunction

  // Index of the message word used by step i.
  function automatic logic [3:0] md5_word_index(logic [5:0] i);
    logic [7:0] j;
    j = {2'b00, i};
    unique case (i[5:4])
      2'd0:    return j[3:0];
      2'd1:    return 4'(8'd5 * j + 8'd1);
      2'd2:    return 4'(8'd3 * j + 8'd5);
      default: return 4'(8'd7 * j);
    endcase
  endfunction

  function automatic logic [31:0] bswap32(logic [31:0] w);
    return {w[7:0], w[15:8], w[23:16], w[31:24]};
  endfunction

  function automatic logic [31:0] rotl32(logic [31:0] w, logic [4:0] n);
    return (w << n) | (w >> (6'd32 - {1'b0, n}));
  endfunction

endpackage

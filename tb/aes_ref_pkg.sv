// aes_ref_pkg: reference model of AES-128 encryption for the testbenches.
//
// Written independently of the RTL: the S-box is the published 16 x 16
// table, GF(2^8) products use a generic shift-and-add multiply reduced by
// 0x11B, and the key schedule expands all 44 words up front. States use
// the same byte order as the RTL: byte 0 is bits [127:120], column-major.
package aes_ref_pkg;

  localparam logic [7:0] SBOX_TBL [256] = '{
    8'h63,8'h7C,8'h77,8'h7B,8'hF2,8'h6B,8'h6F,8'hC5,8'h30,8'h01,8'h67,8'h2B,8'hFE,8'hD7,8'hAB,8'h76,
    8'hCA,8'h82,8'hC9,8'h7D,8'hFA,8'h59,8'h47,8'hF0,8'hAD,8'hD4,8'hA2,8'hAF,8'h9C,8'hA4,8'h72,8'hC0,
    8'hB7,8'hFD,8'h93,8'h26,8'h36,8'h3F,8'hF7,8'hCC,8'h34,8'hA5,8'hE5,8'hF1,8'h71,8'hD8,8'h31,8'h15,
    8'h04,8'hC7,8'h23,8'hC3,8'h18,8'h96,8'h05,8'h9A,8'h07,8'h12,8'h80,8'hE2,8'hEB,8'h27,8'hB2,8'h75,
    8'h09,8'h83,8'h2C,8'h1A,8'h1B,8'h6E,8'h5A,8'hA0,8'h52,8'h3B,8'hD6,8'hB3,8'h29,8'hE3,8'h2F,8'h84,
    8'h53,8'hD1,8'h00,8'hED,8'h20,8'hFC,8'hB1,8'h5B,8'h6A,8'hCB,8'hBE,8'h39,8'h4A,8'h4C,8'h58,8'hCF,
    8'hD0,8'hEF,8'hAA,8'hFB,8'h43,8'h4D,8'h33,8'h85,8'h45,8'hF9,8'h02,8'h7F,8'h50,8'h3C,8'h9F,8'hA8,
    8'h51,8'hA3,8'h40,8'h8F,8'h92,8'h9D,8'h38,8'hF5,8'hBC,8'hB6,8'hDA,8'h21,8'h10,8'hFF,8'hF3,8'hD2,
    8'hCD,8'h0C,8'h13,8'hEC,8'h5F,8'h97,8'h44,8'h17,8'hC4,8'hA7,8'h7E,8'h3D,8'h64,8'h5D,8'h19,8'h73,
    8'h60,8'h81,8'h4F,8'hDC,8'h22,8'h2A,8'h90,8'h88,8'h46,8'hEE,8'hB8,8'h14,8'hDE,8'h5E,8'h0B,8'hDB,
    8'hE0,8'h32,8'h3A,8'h0A,8'h49,8'h06,8'h24,8'h5C,8'hC2,8'hD3,8'hAC,8'h62,8'h91,8'h95,8'hE4,8'h79,
    8'hE7,8'hC8,8'h37,8'h6D,8'h8D,8'hD5,8'h4E,8'hA9,8'h6C,8'h56,8'hF4,8'hEA,8'h65,8'h7A,8'hAE,8'h08,
    8'hBA,8'h78,8'h25,8'h2E,8'h1C,8'hA6,8'hB4,8'hC6,8'hE8,8'hDD,8'h74,8'h1F,8'h4B,8'hBD,8'h8B,8'h8A,
    8'h70,8'h3E,8'hB5,8'h66,8'h48,8'h03,8'hF6,8'h0E,8'h61,8'h35,8'h57,8'hB9,8'h86,8'hC1,8'h1D,8'h9E,
    8'hE1,8'hF8,8'h98,8'h11,8'h69,8'hD9,8'h8E,8'h94,8'h9B,8'h1E,8'h87,8'hE9,8'hCE,8'h55,8'h28,8'hDF,
    8'h8C,8'hA1,8'h89,8'h0D,8'hBF,8'hE6,8'h42,8'h68,8'h41,8'h99,8'h2D,8'h0F,8'hB0,8'h54,8'hBB,8'h16
  };

  typedef logic [7:0] bytes16_t [16];

  function automatic bytes16_t to_bytes(logic [127:0] s);
    bytes16_t b;
    for (int i = 0; i < 16; i++) b[i] = s[127 - 8*i -: 8];
    return b;
  endfunction

  function automatic logic [127:0] from_bytes(bytes16_t b);
    logic [127:0] s;
    for (int i = 0; i < 16; i++) s[127 - 8*i -: 8] = b[i];
    return s;
  endfunction

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [127:0] ref_sub_bytes(logic [127:0] s);
    bytes16_t b = to_bytes(s);
    foreach (b[i]) b[i] = SBOX_TBL[b[i]];
    return from_bytes(b);
  endfunction

  // row r of the output matrix is row r of the input rotated left by r
  function automatic logic [127:0] ref_shift_rows(logic [127:0] s);
    logic [7:0] m [4][4];  // [row][col]
    logic [7:0] o [4][4];
    bytes16_t b = to_bytes(s), ob;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) m[r][c] = b[4*c + r];
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) o[r][c] = m[r][(c + r) % 4];
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) ob[4*c + r] = o[r][c];
    return from_bytes(ob);
  endfunction

  function automatic logic [127:0] ref_mix_columns(logic [127:0] s);
    logic [7:0] M [4][4] = '{'{8'h02, 8'h03, 8'h01, 8'h01},
                             '{8'h01, 8'h02, 8'h03, 8'h01},
                             '{8'h01, 8'h01, 8'h02, 8'h03},
                             '{8'h03, 8'h01, 8'h01, 8'h02}};
    bytes16_t b = to_bytes(s), ob;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        ob[4*c + r] = '0;
        for (int k = 0; k < 4; k++) ob[4*c + r] ^= gmul(M[r][k], b[4*c + k]);
      end
    return from_bytes(ob);
  endfunction

  typedef logic [127:0] round_keys_t [11];

  function automatic round_keys_t ref_key_schedule(logic [127:0] key);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    round_keys_t rk;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {SBOX_TBL[t[31:24]], SBOX_TBL[t[23:16]], SBOX_TBL[t[15:8]], SBOX_TBL[t[7:0]]};
        t[31:24] ^= rc;
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] pt, logic [127:0] key);
    round_keys_t rk = ref_key_schedule(key);
    logic [127:0] s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift_rows(ref_sub_bytes(s));
      if (r != 10) s = ref_mix_columns(s);
      s ^= rk[r];
    end
    return s;
  endfunction

endpackage

// aes_sbox: the AES substitution box for one byte (purely combinational).
//
// The S-box maps a byte to the multiplicative inverse of that byte in
// GF(2^8) (modulo 0x11B, with 00 mapped to 00) followed by the standard
// affine transform b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.
// Rather than listing the 256 entries, the table is built at elaboration
// time by walking the powers of the generator 03 and of its inverse
// together, so p * q = 1 at each step; synthesis sees a constant 256 x 8
// lookup table. The high nibble of the input selects the row and the low
// nibble the column of the usual 16 x 16 printout (e.g. 9A -> B8).
//
// Interface: a (input byte) -> q (substituted byte), no clock.
module aes_sbox (
  input  logic [7:0] a,
  output logic [7:0] q
);

  function automatic logic [7:0] rotl8(logic [7:0] v, int unsigned n);
    return (v << n) | (v >> (8 - n));
  endfunction

  function automatic logic [7:0] affine(logic [7:0] b);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  typedef logic [7:0] table_t [256];

  function automatic table_t build_table();
    table_t t;
    logic [7:0] p, q3;
    p  = 8'h01;
    q3 = 8'h01;
    t[0] = 8'h63;
    t[1] = affine(8'h01);
    for (int i = 0; i < 254; i++) begin
      // p <- p * 03
      p = p ^ {p[6:0], 1'b0} ^ (p[7] ? 8'h1b : 8'h00);
      // q3 <- q3 / 03, i.e. q3 * f6 (the inverse of 03), done by the
      // standard divide-by-three shift/xor sequence
      q3 = q3 ^ (q3 << 1);
      q3 = q3 ^ (q3 << 2);
      q3 = q3 ^ (q3 << 4);
      if (q3[7]) q3 = q3 ^ 8'h09;
      t[p] = affine(q3);
    end
    return t;
  endfunction

  localparam table_t SBOX = build_table();

  assign q = SBOX[a];

endmodule

// aes_pkg: types and small functions shared by the AES-128 datapath.
//
// The 128-bit state is held as 16 bytes in column-major order, the way the
// AES standard lays it out: byte 0 is bits [127:120] (row 0, column 0),
// byte 1 is bits [119:112] (row 1, column 0), ..., byte 15 is bits [7:0]
// (row 3, column 3). xtime() is multiplication by 02 in GF(2^8) modulo the
// polynomial 0x11B; rcon() returns the key-expansion round constant of
// rounds 1 to 10 (01, 02, 04, ... 80, 1b, 36 in the top byte).
package aes_pkg;

  typedef logic [127:0] aes_block_t;
  typedef logic [7:0]   aes_byte_t;

  localparam int unsigned AES_NR = 10;  // rounds for a 128-bit key

  // Byte b (0..15) of a state, b = 4*column + row.
  function automatic aes_byte_t get_byte(aes_block_t s, int unsigned b);
    return s[127 - 8*b -: 8];
  endfunction

  function automatic aes_byte_t xtime(aes_byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Round constant for round 1..10; the constant occupies the top byte of
  // the 32-bit word, the other three bytes are zero.
  function automatic logic [31:0] rcon(logic [3:0] round);
    logic [7:0] r;
    unique case (round)
      4'd1:    r = 8'h01;
      4'd2:    r = 8'h02;
      4'd3:    r = 8'h04;
      4'd4:    r = 8'h08;
      4'd5:    r = 8'h10;
      4'd6:    r = 8'h20;
      4'd7:    r = 8'h40;
      4'd8:    r = 8'h80;
      4'd9:    r = 8'h1b;
      4'd10:   r = 8'h36;
      default: r = 8'h00;
    endcase
    return {r, 24'h0};
  endfunction

endpackage

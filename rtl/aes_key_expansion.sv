// aes_key_expansion: one step of the AES-128 key schedule, combinational.
//
// The round key is four 32-bit words W[i] .. W[i+3], W[i] in the most
// significant bits. The next round key W[i+4] .. W[i+7] is
//   W[i+4] = SubWord(RotWord(W[i+3])) ^ Rcon(round) ^ W[i]
//   W[i+5] = W[i+4] ^ W[i+1]
//   W[i+6] = W[i+5] ^ W[i+2]
//   W[i+7] = W[i+6] ^ W[i+3]
// where RotWord rotates the word left by one byte and SubWord passes each
// byte through the S-box. Applying it with round = 1, 2, ... 10 to the
// cipher key yields the keys of rounds 1 to 10, so the encryption core
// can compute its round keys on the fly, one per round, instead of
// storing all eleven.
//
// Interface: key_in (round key i), round (1..10, selects Rcon)
//            -> key_out (round key i+1), no clock.
module aes_key_expansion
  import aes_pkg::*;
(
  input  logic [127:0] key_in,
  input  logic [3:0]   round,
  output logic [127:0] key_out
);

  logic [31:0] w0, w1, w2, w3;
  logic [31:0] rot, sub;
  logic [31:0] w4, w5, w6, w7;

  assign {w0, w1, w2, w3} = key_in;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_subword
    aes_sbox u_sbox (
      .a (rot[8*b +: 8]),
      .q (sub[8*b +: 8])
    );
  end

  assign w4 = sub ^ rcon(round) ^ w0;
  assign w5 = w4 ^ w1;
  assign w6 = w5 ^ w2;
  assign w7 = w6 ^ w3;
  assign key_out = {w4, w5, w6, w7};

endmodule

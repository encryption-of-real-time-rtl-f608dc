// aes_mix_columns: the MixColumns step of AES, purely combinational.
//
// Every column (a0 a1 a2 a3) of the state is multiplied in GF(2^8),
// modulo the polynomial 0x11B (283), by the fixed matrix
//   02 03 01 01
//   01 02 03 01
//   01 01 02 03
//   03 01 01 02
// Multiplication by 02 is xtime (shift left, xor 0x1B on carry) and by 03
// is xtime(a) ^ a, so each output byte is a handful of xors.
// The last AES round skips this step; the round logic selects around it.
//
// Interface: s_in (state) -> s_out (mixed state), no clock.
module aes_mix_columns
  import aes_pkg::*;
(
  input  logic [127:0] s_in,
  output logic [127:0] s_out
);

  function automatic logic [31:0] mix_col(logic [31:0] col);
    aes_byte_t a0, a1, a2, a3;
    aes_byte_t b0, b1, b2, b3;
    {a0, a1, a2, a3} = col;
    b0 = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
    b1 = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
    b2 = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
    b3 = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    return {b0, b1, b2, b3};
  endfunction

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      s_out[127 - 32*c -: 32] = mix_col(s_in[127 - 32*c -: 32]);
    end
  end

endmodule

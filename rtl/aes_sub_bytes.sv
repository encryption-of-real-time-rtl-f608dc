// aes_sub_bytes: the SubBytes step of AES, purely combinational.
//
// Each of the 16 bytes of the 128-bit state goes through its own copy of
// the S-box (aes_sbox), so the whole state is substituted in one pass.
//
// Interface: s_in (state) -> s_out (substituted state), no clock.
module aes_sub_bytes (
  input  logic [127:0] s_in,
  output logic [127:0] s_out
);

  for (genvar b = 0; b < 16; b++) begin : g_byte
    aes_sbox u_sbox (
      .a (s_in [8*b +: 8]),
      .q (s_out[8*b +: 8])
    );
  end

endmodule

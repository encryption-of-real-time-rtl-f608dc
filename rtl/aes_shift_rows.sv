// aes_shift_rows: the ShiftRows step of AES, purely combinational.
//
// The state is a 4 x 4 byte matrix stored column by column (byte 4*c + r
// at bits [127-8*(4c+r) -: 8]). Row 0 is left alone and row r is rotated
// left by r byte positions, the bytes that fall off on the left coming
// back on the right: out[r][c] = in[r][(c + r) mod 4]. This is only
// wiring; it costs no logic.
//
// Interface: s_in (state) -> s_out (shifted state), no clock.
module aes_shift_rows
  import aes_pkg::*;
(
  input  logic [127:0] s_in,
  output logic [127:0] s_out
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        s_out[127 - 8*(4*c + r) -: 8] = get_byte(s_in, 4*((c + r) % 4) + r);
      end
    end
  end

endmodule

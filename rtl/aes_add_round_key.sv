// aes_add_round_key: the AddRoundKey step of AES, purely combinational.
//
// Each byte p_i of the state is xored with the byte k_i in the same
// position of the round key, giving q_i = p_i ^ k_i for all 16 bytes.
//
// Interface: s_in (state), rkey (round key) -> s_out, no clock.
module aes_add_round_key (
  input  logic [127:0] s_in,
  input  logic [127:0] rkey,
  output logic [127:0] s_out
);

  assign s_out = s_in ^ rkey;

endmodule

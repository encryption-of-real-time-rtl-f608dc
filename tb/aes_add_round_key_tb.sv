// aes_add_round_key_tb: random states and keys; the result must be the
// bytewise xor, and applying the same key twice must restore the state.
module aes_add_round_key_tb;
  logic [127:0] s_in, rkey, s_out;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  aes_add_round_key dut (.s_in(s_in), .rkey(rkey), .s_out(s_out));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      logic [127:0] e;
      s_in = {$urandom, $urandom, $urandom, $urandom};
      rkey = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      for (int b = 0; b < 16; b++) e[8*b +: 8] = s_in[8*b +: 8] ^ rkey[8*b +: 8];
      checks++;
      if (s_out !== e) begin
        failures++;
        $display("FAIL %032h ^ %032h = %032h", s_in, rkey, s_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

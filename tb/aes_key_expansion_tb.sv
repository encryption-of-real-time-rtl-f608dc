// aes_key_expansion_tb: chains the step from a cipher key through rounds
// 1..10 and compares every round key with the reference key schedule
// (the FIPS-197 example key, the key used in the system test and random
// keys); also checks the last round key of the FIPS-197 example directly.
module aes_key_expansion_tb;
  import aes_ref_pkg::*;
  logic [127:0] key_in, key_out;
  logic [3:0]   round;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  aes_key_expansion dut (.key_in(key_in), .round(round), .key_out(key_out));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_key(logic [127:0] k);
    round_keys_t rk = ref_key_schedule(k);
    key_in = k;
    for (int r = 1; r <= 10; r++) begin
      round = 4'(r);
      @(posedge clk);
      checks++;
      if (key_out !== rk[r]) begin
        failures++;
        $display("FAIL key %032h round %0d: %032h expected %032h", k, r, key_out, rk[r]);
      end
      key_in = key_out;
    end
  endtask

  initial begin
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    checks++;
    if (key_in !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++;
      $display("FAIL round 10 key of the FIPS-197 example: %032h", key_in);
    end
    run_key(128'haabbccddeeff12345678901234567890);
    for (int i = 0; i < 50; i++) run_key({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// aes_encrypt_tb: encrypts the FIPS-197 example, the image-encryption
// example (plain 12aabb22..aabbccee, key aabbccdd..34567890, cipher
// 3ac215d1..d8f73072) and random blocks, comparing with the reference
// model. Checks that done rises at the 10th rising edge after the
// one that samples start, that dstate
// counts 1..10 during a block, and that a start while busy is ignored.
module aes_encrypt_tb;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [127:0] plain, key, cipher;
  logic busy, done;
  logic [3:0] dstate;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  aes_encrypt dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Stimulus changes and checks happen on the falling edge, half a clock
  // away from the rising edge at which the core samples its inputs.
  task automatic encrypt(logic [127:0] p, logic [127:0] k, logic [127:0] expected, bit poke_busy);
    int cycles;
    @(negedge clk);
    plain = p; key = k; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < 40) begin
      check($sformatf("dstate %0d after %0d clocks", dstate, cycles), dstate == 4'(cycles));
      if (poke_busy && cycles == 3) begin
        // a second start while busy must not disturb the block in flight
        plain = ~p; key = ~k; start = 1'b1;
      end
      @(negedge clk);
      start = 1'b0;
      plain = p; key = k;
      cycles++;
    end
    check($sformatf("latency %0d", cycles), cycles == 11);
    check($sformatf("cipher %032h expected %032h", cipher, expected), cipher === expected);
    check("busy low after done", !busy && dstate == 0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
            128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1'b0);
    encrypt(128'h12aabb223344556677889900aabbccee, 128'haabbccddeeff12345678901234567890,
            128'h3ac215d1f6d1f25e2e8ac485d8f73072, 1'b1);
    for (int i = 0; i < 100; i++) begin
      logic [127:0] p, k;
      p = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      encrypt(p, k, ref_encrypt(p, k), 1'b0);
    end
    // the cipher text stays valid until the next start
    repeat (5) @(posedge clk);
    check("cipher held", cipher === ref_encrypt(plain, key));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

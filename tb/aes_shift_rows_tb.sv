// aes_shift_rows_tb: drives random and fixed states into aes_shift_rows and
// compares with the reference model.
module aes_shift_rows_tb;
  import aes_ref_pkg::*;
  logic [127:0] s_in, s_out, exp_out;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  aes_shift_rows dut (.s_in(s_in), .s_out(s_out));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [127:0] v);
    s_in = v;
    @(posedge clk);
    exp_out = ref_shift_rows(v);
    checks++;
    if (s_out !== exp_out) begin
      failures++;
      $display("FAIL in=%032h out=%032h expected=%032h", v, s_out, exp_out);
    end
  endtask

  initial begin
    check(128'h000102030405060708090a0b0c0d0e0f);
    check(128'hffffffffffffffffffffffffffffffff);
    check(128'h0);
    // round 1 of the FIPS-197 example: after SubBytes -> after ShiftRows
    s_in = 128'hd42711aee0bf98f1b8b45de51e415230;
    @(posedge clk);
    checks++;
    if (s_out !== 128'hd4bf5d30e0b452aeb84111f11e2798e5) begin failures++; $display("FAIL fixed vector"); end
    for (int i = 0; i < 500; i++)
      check({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

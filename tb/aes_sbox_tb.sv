// aes_sbox_tb: checks all 256 S-box entries against the published table,
// plus the worked example 9A -> B8.
module aes_sbox_tb;
  import aes_ref_pkg::*;
  logic [7:0] a, q;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  aes_sbox dut (.a(a), .q(q));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      @(posedge clk);
      checks++;
      if (q !== SBOX_TBL[i]) begin
        failures++;
        $display("FAIL sbox(%02h) = %02h, expected %02h", a, q, SBOX_TBL[i]);
      end
    end
    a = 8'h9a;
    @(posedge clk);
    checks++;
    if (q !== 8'hb8) begin failures++; $display("FAIL sbox(9a) = %02h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// ov7670_reg_rom_tb: reads every entry of the camera register table and
// compares it with the RGB565 set-up sequence (reset, COM7 = RGB,
// COM15 = RGB565 full range, RGB444 off); last must mark entry 3 only.
module ov7670_reg_rom_tb;
  logic [3:0] idx;
  logic [7:0] addr, data;
  logic last;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  ov7670_reg_rom dut (.*);

  localparam logic [15:0] EXPECTED [4] = '{16'h1280, 16'h1204, 16'h40D0, 16'h8C00};

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      idx = 4'(i);
      @(posedge clk);
      checks++;
      if ({addr, data} !== EXPECTED[i] || last !== (i == 3)) begin
        failures++;
        $display("FAIL entry %0d: %02h=%02h last=%0b", i, addr, data, last);
      end
    end
    for (int i = 4; i < 16; i++) begin
      idx = 4'(i);
      @(posedge clk);
      checks++;
      if (last) begin failures++; $display("FAIL last set at %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

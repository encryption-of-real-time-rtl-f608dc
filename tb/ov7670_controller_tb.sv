// ov7670_controller_tb: runs the controller from reset to done and checks
// the camera reset pulse, the register writes seen on the bus (in order),
// the pause after the software reset, PWDN low, XCLK at half the clock
// rate, and that done stays high and the bus goes quiet afterwards.
module ov7670_controller_tb;
  localparam int CLK_HZ = 8_000_000, SCCB_HZ = 400_000;
  localparam int HOLD = 50, WAITC = 300;
  logic clk = 0, rst_n = 0;
  logic sioc, siod_o, siod_oe, pwdn, cam_reset_n, xclk, done, siod;
  int checks = 0, failures = 0;
  int reset_low = 0, xclk_edges = 0, clk_edges = 0;
  time t_first_done = 0, t_second_start = 0;
  always #5 clk = ~clk;

  ov7670_controller #(.CLK_HZ(CLK_HZ), .SCCB_HZ(SCCB_HZ), .RESET_HOLD(HOLD), .RESET_WAIT(WAITC)) dut (.*);
  assign siod = siod_oe ? siod_o : 1'b1;
  sccb_monitor mon (.sioc(sioc), .siod(siod));

  always @(posedge clk) if (rst_n) begin
    clk_edges++;
    if (!cam_reset_n) reset_low++;
  end
  always @(posedge xclk) if (rst_n) xclk_edges++;
  always @(posedge dut.u_sccb.done) if (t_first_done == 0) t_first_done = $time;
  always @(posedge dut.u_sccb.busy) if (t_first_done != 0 && t_second_start == 0) t_second_start = $time;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam logic [15:0] EXPECTED [4] = '{16'h1280, 16'h1204, 16'h40D0, 16'h8C00};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    check("camera held in reset first", !cam_reset_n);
    wait (done);
    @(posedge clk);
    check($sformatf("reset low for %0d clocks", reset_low), reset_low >= HOLD && reset_low <= HOLD + 2);
    check("pwdn low", !pwdn);
    check($sformatf("xclk %0d edges in %0d clocks", xclk_edges, clk_edges),
          xclk_edges >= clk_edges / 2 - 1 && xclk_edges <= clk_edges / 2 + 1);
    check($sformatf("pause after reset write %0t", t_second_start - t_first_done),
          t_second_start - t_first_done >= WAITC * 10);
    check($sformatf("%0d writes", mon.addrs.size()), mon.addrs.size() == 4);
    for (int i = 0; i < 4 && mon.addrs.size() > 0; i++) begin
      logic [7:0] id, a, v;
      id = mon.ids.pop_front(); a = mon.addrs.pop_front(); v = mon.datas.pop_front();
      check($sformatf("write %0d: %02h %02h=%02h", i, id, a, v), {id, a, v} == {8'h42, EXPECTED[i]});
    end
    repeat (2000) @(posedge clk);
    check("done stays high", done);
    check("no further writes", mon.addrs.size() == 0 && mon.bad_cycles == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

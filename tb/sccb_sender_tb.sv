// sccb_sender_tb: sends several register writes and decodes the bus with
// sccb_monitor: ID 0x42, address and value must arrive intact, every cycle
// must be 27 bits with proper start / stop, SIO_D must be released in the
// three don't-care bits, busy / done must frame the cycle, and a write
// must take the expected 116 quarter periods (plus the clock that
// leaves idle).
module sccb_sender_tb;
  localparam int CLK_HZ = 8_000_000, SCCB_HZ = 400_000;  // quarter = 5 clocks
  localparam int QUARTER = CLK_HZ / (4 * SCCB_HZ);
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [7:0] addr, data;
  logic busy, done, sioc, siod_o, siod_oe, siod;
  int checks = 0, failures = 0;
  int released = 0;
  always #5 clk = ~clk;

  sccb_sender #(.CLK_HZ(CLK_HZ), .SCCB_HZ(SCCB_HZ)) dut (.*);
  assign siod = siod_oe ? siod_o : 1'b1;   // pull-up
  sccb_monitor mon (.sioc(sioc), .siod(siod));

  always @(posedge sioc) if (busy && !siod_oe) released++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write(logic [7:0] a, logic [7:0] v);
    int cycles = 0;
    int rel0 = released;
    @(negedge clk);
    addr = a; data = v; start = 1;
    @(negedge clk);
    start = 0; addr = ~a; data = ~v;    // inputs are sampled with start
    check("busy after start", busy);
    while (!done && cycles < 1000) begin @(negedge clk); cycles++; end
    check($sformatf("write takes %0d clocks", cycles + 1), cycles + 1 == 116 * QUARTER + 1);
    @(negedge clk);
    check("idle after done", !busy && sioc && siod);
    check("monitor saw one write", mon.addrs.size() == 1);
    if (mon.addrs.size() == 1) begin
      logic [7:0] i, ra, rv;
      i = mon.ids.pop_front(); ra = mon.addrs.pop_front(); rv = mon.datas.pop_front();
      check($sformatf("id %02h", i), i == 8'h42);
      check($sformatf("addr %02h expected %02h", ra, a), ra == a);
      check($sformatf("data %02h expected %02h", rv, v), rv == v);
    end
    check("three released bits", released - rel0 == 3);
  endtask

  initial begin
    addr = 0; data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check("idle lines high", sioc && siod && !busy);
    write(8'h12, 8'h80);
    write(8'h40, 8'hD0);
    write(8'h00, 8'hFF);
    for (int i = 0; i < 10; i++) write(8'($urandom), 8'($urandom));
    check("no malformed cycles", mon.bad_cycles == 0);
    check($sformatf("SIO_C half period %0d", mon.min_half_ps), mon.min_half_ps >= QUARTER * 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// uart_tx_tb: sends bytes, some back to back, and decodes the line with an
// independent receiver that samples each bit in its middle. Checks the
// data, the start and stop bits, the bit length (CLK_HZ / BAUD clocks),
// that ready is low while a byte is on the line, and the byte period
// (10 bit times plus the one clock in which the next byte is taken).
module uart_tx_tb;
  localparam int CLK_HZ = 960_000, BAUD = 9600;   // 100 clocks per bit
  localparam int DIV = CLK_HZ / BAUD;
  logic clk = 0, rst_n = 0;
  logic valid = 0;
  logic [7:0] data = 0;
  logic ready, txd;
  logic [7:0] rx_q[$];
  int framing_errors = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  // receiver: a clocked sampler that detects the start bit's falling edge
  // and samples every bit in its middle
  logic [7:0] rx_byte;
  int rx_cnt = 0, rx_bit = -1;
  logic txd_q = 1'b1;
  always @(posedge clk) begin
    txd_q <= txd;
    if (rst_n) begin
      if (rx_bit < 0) begin
        if (txd_q && !txd) begin rx_bit = 0; rx_cnt = DIV / 2; end
      end else if (rx_cnt > 1) rx_cnt--;
      else begin
        rx_cnt = DIV;
        if (rx_bit == 0 && txd) framing_errors++;
        if (rx_bit >= 1 && rx_bit <= 8) rx_byte[rx_bit - 1] = txd;
        if (rx_bit == 9) begin
          if (!txd) framing_errors++;
          rx_q.push_back(rx_byte);
          rx_bit = -1;
        end else rx_bit++;
      end
    end
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [7:0] sent[$];
    int cycles;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle high and ready", txd && ready);
    for (int i = 0; i < 20; i++) begin
      logic [7:0] b;
      b = (i == 0) ? 8'h3a : (i == 1) ? 8'hc5 : 8'($urandom);
      while (!ready) @(negedge clk);
      valid = 1; data = b;
      sent.push_back(b);
      @(negedge clk);
      valid = 0; data = 8'hxx;
      cycles = 1;
      while (!ready) begin
        if (cycles == 5) check("ready low while sending", !ready);
        @(negedge clk);
        cycles++;
      end
      check($sformatf("byte period %0d clocks", cycles), cycles == 10 * DIV + 1);
      if (i % 4 == 3) repeat ($urandom_range(300)) @(negedge clk);
    end
    repeat (2 * DIV) @(negedge clk);
    check($sformatf("received %0d bytes", rx_q.size()), rx_q.size() == sent.size());
    while (rx_q.size() > 0 && sent.size() > 0) begin
      logic [7:0] r, s;
      r = rx_q.pop_front();
      s = sent.pop_front();
      check($sformatf("byte %02h received as %02h", s, r), r == s);
    end
    check("no framing errors", framing_errors == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

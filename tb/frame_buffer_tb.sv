// frame_buffer_tb: writes random words on the write clock and reads them
// back on an unrelated read clock; checks the one-clock registered read
// latency, that reads of untouched words are unaffected by writes to
// others, and that a full-depth fill reads back exactly.
module frame_buffer_tb;
  localparam int DEPTH = 1024, WIDTH = 16;
  logic wclk = 0, rclk = 0;
  logic we = 0;
  logic [9:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  frame_buffer #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    repeat (100000) @(posedge rclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int a, logic [15:0] v);
    @(negedge wclk);
    we = 1; waddr = 10'(a); wdata = v;
    @(negedge wclk);
    we = 0;
    model[a] = v;
  endtask

  task automatic read_check(int a);
    @(negedge rclk);
    raddr = 10'(a);
    @(posedge rclk);
    #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("FAIL addr %0d read %04h expected %04h", a, rdata, model[a]);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) write(i, 16'($urandom));
    for (int i = 0; i < DEPTH; i++) read_check(i);
    for (int i = 0; i < 300; i++) begin
      write($urandom_range(DEPTH - 1), 16'($urandom));
      read_check($urandom_range(DEPTH - 1));
    end
    // latency: the word appears one read clock after the address
    @(negedge rclk);
    raddr = 10'd5;
    @(posedge rclk); #1;
    @(negedge rclk);
    raddr = 10'd6;
    #1;
    checks++;
    if (rdata !== model[5] || model[5] == model[6]) begin
      failures++;
      $display("FAIL read is not registered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

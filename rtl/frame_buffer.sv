// frame_buffer: simple dual-port RAM holding one image, DEPTH words of
// WIDTH bits (32 x 32 pixels of RGB565 by default).
//
// Port A writes on wclk (the camera's pixel clock) when we is high.
// Port B reads on rclk (the system clock): rdata is the word at raddr one
// rclk edge after raddr is presented (registered read, as in FPGA block
// RAM). The two clocks are independent. The contents are not initialized.
module frame_buffer #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    rdata <= mem[raddr];
  end

endmodule

// image_encryption_top: real-time image encryption system for an FPGA.
//
// An OV7670 camera is configured over its SCCB control bus, one frame is
// captured into an on-chip dual-port frame buffer, and the frame is
// encrypted with AES-128 eight RGB565 pixels (one 128-bit block) at a time.
// The cipher text leaves as a byte stream on a 9600 baud serial line to a
// ZigBee radio module.
//
//   camera --SCCB-- ov7670_controller (sccb_sender + ov7670_reg_rom)
//   camera --pixels--> ov7670_capture --wen/addr/data--> frame_buffer
//   frame_buffer --> image_encryptor (aes_encrypt) --> uart_tx --> ZigBee
//
// Clock domains: clk (system, CLK_HZ) runs the controller, the encryptor
// and the transmitter and reads the frame buffer; cam_pclk (the camera's
// pixel clock) runs the capture logic and writes the frame buffer. Two
// toggle signals, each passed through a two-flip-flop synchronizer, hand a
// frame from capture to encryption and back; the capture logic gets a
// reset synchronized to cam_pclk. While a frame is being encrypted and
// sent the capture logic writes nothing, then it takes the next frame.
// At the defaults one frame (1024 pixels, 128 blocks, 2048 bytes) takes
// about 2.1 s on the line; the encryption itself 37 clocks per block.
//
// The SIO_D pin is brought out as cam_siod_o / cam_siod_oe for a tristate
// pad; the key is an input that is sampled at the start of every block.
module image_encryption_top #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned BAUD    = 9600,
  parameter int unsigned SCCB_HZ = 100_000,
  parameter int unsigned IMG_W   = 32,
  parameter int unsigned IMG_H   = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] key,
  // camera control
  output logic         cam_sioc,
  output logic         cam_siod_o,
  output logic         cam_siod_oe,
  output logic         cam_pwdn,
  output logic         cam_reset_n,
  output logic         cam_xclk,
  // camera video
  input  logic         cam_pclk,
  input  logic         cam_vsync,
  input  logic         cam_href,
  input  logic [7:0]   cam_data,
  // serial line to the ZigBee module
  output logic         zigbee_txd,
  // status
  output logic         config_done,
  output logic         encrypting,
  output logic         frame_sent
);

  localparam int unsigned NPIX = IMG_W * IMG_H;
  localparam int unsigned AW   = $clog2(NPIX);

  logic          pclk_rst_n;
  logic          cap_wen;
  logic [AW-1:0] cap_addr, rd_addr;
  logic [15:0]   cap_data, rd_data;
  logic          frame_tgl, release_tgl;
  logic          tx_valid, tx_ready;
  logic [7:0]    tx_data;

  ov7670_controller #(.CLK_HZ(CLK_HZ), .SCCB_HZ(SCCB_HZ)) u_ctrl (
    .clk, .rst_n,
    .sioc(cam_sioc), .siod_o(cam_siod_o), .siod_oe(cam_siod_oe),
    .pwdn(cam_pwdn), .cam_reset_n(cam_reset_n), .xclk(cam_xclk),
    .done(config_done)
  );

  // reset for the pixel clock domain: asserted at once, released in step
  sync_2ff u_pclk_rst (.clk(cam_pclk), .rst_n, .d(1'b1), .q(pclk_rst_n));

  ov7670_capture #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_cap (
    .pclk(cam_pclk), .rst_n(pclk_rst_n),
    .vsync(cam_vsync), .href(cam_href), .d(cam_data),
    .release_tgl,
    .wen(cap_wen), .addr(cap_addr), .data(cap_data),
    .frame_tgl
  );

  frame_buffer #(.DEPTH(NPIX), .WIDTH(16)) u_fb (
    .wclk(cam_pclk), .we(cap_wen), .waddr(cap_addr), .wdata(cap_data),
    .rclk(clk), .raddr(rd_addr), .rdata(rd_data)
  );

  image_encryptor #(.NPIX(NPIX)) u_enc (
    .clk, .rst_n,
    .frame_tgl, .release_tgl,
    .key,
    .raddr(rd_addr), .rdata(rd_data),
    .tx_valid, .tx_data, .tx_ready,
    .frame_sent, .busy(encrypting)
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst_n,
    .valid(tx_valid), .data(tx_data), .ready(tx_ready),
    .txd(zigbee_txd)
  );

endmodule

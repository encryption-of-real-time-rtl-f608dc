// image_encryption_top_tb: end-to-end test of the whole system at reduced
// clock rates (960 kHz system clock, so 100 clocks per serial bit, and a
// 24 kHz control bus) but at the full 32 x 32 image size. The camera model
// streams 40 x 36 frames once configured; two frames are captured,
// encrypted with the example key and sent, and top_checker verifies every
// byte against the reference model and counts each mechanism.
module image_encryption_top_tb;
  localparam int CLK_HZ = 960_000, BAUD = 9600, SCCB_HZ = 24_000;
  localparam logic [127:0] KEY = 128'haabbccddeeff12345678901234567890;
  logic clk = 0, rst_n = 1;
  logic cam_sioc, cam_siod_o, cam_siod_oe, cam_pwdn, cam_reset_n, cam_xclk;
  logic cam_pclk, cam_vsync, cam_href;
  logic [7:0] cam_data;
  logic zigbee_txd, config_done, encrypting, frame_sent;
  logic [127:0] key = KEY;
  always #5 clk = ~clk;

  image_encryption_top #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .SCCB_HZ(SCCB_HZ)) dut (.*);

  ov7670_model #(.W(40), .H(36)) cam (
    .xclk(cam_xclk), .reset_n(cam_reset_n), .pwdn(cam_pwdn),
    .sioc(cam_sioc), .siod(cam_siod_oe ? cam_siod_o : 1'b1),
    .pclk(cam_pclk), .vsync(cam_vsync), .href(cam_href), .d(cam_data)
  );

  top_checker #(.IMG_W(32), .IMG_H(32), .CAM_W(40), .CAM_H(36), .DIV(CLK_HZ / BAUD),
                .N_FRAMES(2), .WATCHDOG(64'd6_000_000), .KEY(KEY)) chk (
    .clk, .rst_n, .txd(zigbee_txd), .frame_sent, .config_done, .cam_reset_n,
    .cam_frame_no(cam.frame_no), .cam_writes(cam.n_writes),
    .cap_wen(dut.cap_wen), .aes_done(dut.u_enc.aes_done),
    .tx_stall(dut.tx_valid && !dut.tx_ready)
  );

  // reset for 10 clocks, long enough for the pixel-clock domain (camera
  // clock = half the system clock) to see it on its own clock edges
  initial begin
    #1 rst_n = 0;
    repeat (10) @(posedge clk);
    rst_n = 1;
  end
endmodule

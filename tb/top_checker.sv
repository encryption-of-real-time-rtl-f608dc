// top_checker: end-to-end checking for image_encryption_top, shared by the
// reduced-size and the full-size system testbenches.
//
// It decodes the serial line (8N1, DIV clocks per bit, sampled mid-bit),
// groups the bytes into frames of IMG_W * IMG_H * 2 bytes, and for each
// frame finds the camera frame whose top-left IMG_W x IMG_H window, packed
// 8 pixels per block and AES-128 encrypted with KEY (reference model),
// gives exactly those bytes. It counts how often each mechanism of the
// design happened and fails if one never did: camera register writes,
// camera reset pulse, pixels dropped outside the window, camera frames
// skipped while a frame is held, AES blocks, transmitter back-pressure,
// frames sent. After N_FRAMES frames it prints the result and finishes;
// a watchdog of WATCHDOG clocks ends a stuck run as a failure.
module top_checker #(
  parameter int          IMG_W    = 32,
  parameter int          IMG_H    = 32,
  parameter int          CAM_W    = 40,
  parameter int          CAM_H    = 36,
  parameter int          DIV      = 5208,
  parameter int          N_FRAMES = 1,
  parameter longint      WATCHDOG = 64'd200_000_000,
  parameter logic [127:0] KEY     = 128'h0
) (
  input logic clk,
  input logic rst_n,
  input logic txd,
  input logic frame_sent,
  input logic config_done,
  input logic cam_reset_n,
  input int   cam_frame_no,
  input int   cam_writes,
  input logic cap_wen,
  input logic aes_done,
  input logic tx_stall
);
  import aes_ref_pkg::*;
  import cam_ref_pkg::*;

  localparam int NBYTES = IMG_W * IMG_H * 2;

  int checks = 0, failures = 0;
  logic [7:0] rx_q[$];
  int rx_cnt = 0, rx_bit = -1;
  logic [7:0] rx_byte;
  logic txd_q = 1'b1;
  int framing_errors = 0;
  int n_aes = 0, n_stall = 0, n_wen = 0, n_sent = 0, n_reset_pulses = 0;
  int captured [$];
  logic cam_reset_q = 1'b1;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // serial receiver
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

  // mechanism counters
  // counted up to the end of the last frame checked
  always @(posedge clk) if (rst_n && n_sent < N_FRAMES) begin
    if (aes_done) n_aes++;
    if (tx_stall) n_stall++;
    cam_reset_q <= cam_reset_n;
    if (!cam_reset_q && cam_reset_n) n_reset_pulses++;
  end
  always @(posedge clk) if (rst_n && frame_sent) n_sent++;
  always @(posedge cap_wen) if (n_sent < N_FRAMES) n_wen++;

  function automatic logic [7:0] expected_byte(int f, int n);
    // byte n of the encrypted window of camera frame f
    logic [127:0] pt;
    int blk = n / 16;
    for (int i = 0; i < 8; i++) begin
      int p = 8 * blk + i;
      pt[127 - 16*i -: 16] = pixel_value(f, p % IMG_W, p / IMG_W);
    end
    return ref_encrypt(pt, KEY)[127 - 8*(n % 16) -: 8];
  endfunction

  task automatic check_frame(int k);
    logic [7:0] got [];
    int f_found = -1;
    int bad = 0;
    got = new[NBYTES];
    foreach (got[i]) got[i] = rx_q.pop_front();
    // which camera frame was captured: match the first block
    for (int f = 0; f <= cam_frame_no && f_found < 0; f++) begin
      bit match = 1;
      for (int n = 0; n < 16; n++) if (got[n] != expected_byte(f, n)) match = 0;
      if (match) f_found = f;
    end
    check($sformatf("frame %0d: first block matches a camera frame", k), f_found >= 0);
    if (f_found < 0) begin
      $write("got:");
      for (int n = 0; n < 16; n++) $write(" %02h", got[n]);
      $display("");
      for (int f = 0; f <= cam_frame_no; f++) $display("frame %0d pixel0 %04h expected byte0 %02h", f, pixel_value(f, 0, 0), expected_byte(f, 0));
    end
    if (f_found >= 0) begin
      for (int n = 0; n < NBYTES; n++) if (got[n] != expected_byte(f_found, n)) bad++;
      check($sformatf("frame %0d (camera frame %0d): %0d wrong bytes", k, f_found, bad), bad == 0);
      captured.push_back(f_found);
    end
  endtask

  initial begin
    longint c = 0;
    fork
      begin
        for (int k = 0; k < N_FRAMES; k++) begin
          wait (rx_q.size() >= NBYTES);
          check_frame(k);
        end
        repeat (4 * DIV) @(posedge clk);
      end
      begin
        while (c < WATCHDOG) begin @(posedge clk); c++; end
        failures++;
        $display("watchdog expired: %0d bytes received", rx_q.size());
      end
    join_any
    check("configured", config_done);
    check($sformatf("camera register writes: %0d", cam_writes), cam_writes == 4);
    check($sformatf("camera reset pulses: %0d", n_reset_pulses), n_reset_pulses == 1);
    check($sformatf("frames sent: %0d", n_sent), n_sent == N_FRAMES);
    check($sformatf("camera frames streamed: %0d", cam_frame_no), cam_frame_no >= N_FRAMES);
    check($sformatf("AES blocks: %0d", n_aes), n_aes == N_FRAMES * IMG_W * IMG_H / 8);
    check($sformatf("transmitter back-pressure cycles: %0d", n_stall), n_stall > 0);
    check($sformatf("buffer writes %0d, %0d camera pixels per frame (crop)", n_wen, CAM_W * CAM_H),
          n_wen == N_FRAMES * IMG_W * IMG_H && CAM_W * CAM_H > IMG_W * IMG_H);

    if (N_FRAMES > 1 && captured.size() > 1)
      check($sformatf("camera frames skipped while held: %0d", captured[1] - captured[0] - 1),
            captured[1] - captured[0] > 1);
    check($sformatf("framing errors: %0d", framing_errors), framing_errors == 0);
    check($sformatf("no extra bytes: %0d", rx_q.size()), rx_q.size() == 0);
    $display("mechanisms: sccb_writes=%0d cam_reset=%0d aes_blocks=%0d stall_cycles=%0d pixels_written=%0d frames_sent=%0d",
             cam_writes, n_reset_pulses, n_aes, n_stall, n_wen, n_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// ov7670_capture_tb: feeds camera frames larger than the window
// (CAM_W x CAM_H bytes pairs) into the capture logic and records every
// buffer write. Checks: each window pixel is written exactly once, at
// y * IMG_W + x, with the value {first byte, second byte}; nothing outside
// the window is written; frame_tgl toggles once per captured frame; frames
// arriving while the frame is held are not written; after release_tgl the
// next complete frame (not the one in progress) is captured.
module ov7670_capture_tb;
  import cam_ref_pkg::*;
  localparam int IMG_W = 32, IMG_H = 32, CAM_W = 40, CAM_H = 36, HBLANK = 6;
  logic pclk = 0, rst_n = 0;
  logic vsync = 0, href = 0;
  logic [7:0] d = 0;
  logic release_tgl = 0;
  logic wen;
  logic [9:0] addr;
  logic [15:0] data;
  logic frame_tgl;
  int checks = 0, failures = 0;
  int writes_in_frame = 0, frame_no = 0;
  int nwrites [IMG_W*IMG_H];
  logic [15:0] got [IMG_W*IMG_H];
  always #5 pclk = ~pclk;

  ov7670_capture #(.IMG_W(IMG_W), .IMG_H(IMG_H)) dut (.*);

  always @(posedge pclk) if (wen) begin
    nwrites[addr]++;
    got[addr] = data;
    writes_in_frame++;
  end

  initial begin
    repeat (200000) @(posedge pclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one camera frame, bytes change on the falling edge of pclk
  task automatic send_frame(int f);
    @(negedge pclk);
    vsync = 1;
    repeat (10) @(negedge pclk);
    vsync = 0;
    repeat (20) @(negedge pclk);
    for (int y = 0; y < CAM_H; y++) begin
      for (int x = 0; x < CAM_W; x++) begin
        logic [15:0] p = pixel_value(f, x, y);
        href = 1; d = p[15:8];
        @(negedge pclk);
        d = p[7:0];
        @(negedge pclk);
      end
      href = 0; d = 0;
      repeat (HBLANK) @(negedge pclk);
    end
  endtask

  task automatic clear_record();
    foreach (nwrites[i]) nwrites[i] = 0;
    writes_in_frame = 0;
  endtask

  task automatic check_frame(int f);
    int bad = 0;
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++)
        if (nwrites[y*IMG_W + x] != 1 || got[y*IMG_W + x] != pixel_value(f, x, y)) bad++;
    check($sformatf("frame %0d: %0d wrong pixels", f, bad), bad == 0);
    check($sformatf("frame %0d: %0d writes", f, writes_in_frame), writes_in_frame == IMG_W * IMG_H);
  endtask

  initial begin
    logic t0;
    repeat (3) @(posedge pclk);
    rst_n = 1;
    // start in the middle of a line with href high: ignored until vsync
    href = 1; d = 8'h55;
    repeat (7) @(negedge pclk);
    href = 0;
    clear_record();
    check("no write before vsync", writes_in_frame == 0);
    t0 = frame_tgl;
    send_frame(0);
    check_frame(0);
    check("frame_tgl toggled", frame_tgl != t0);
    // held: the next two frames must not be written
    clear_record();
    send_frame(1);
    send_frame(2);
    check($sformatf("held frames not written (%0d writes)", writes_in_frame), writes_in_frame == 0);
    check("frame_tgl unchanged while held", frame_tgl != t0);
    // release in the middle of frame 3: frame 3 is skipped, frame 4 captured
    fork
      send_frame(3);
      begin repeat (200) @(negedge pclk); release_tgl = ~release_tgl; end
    join
    check($sformatf("frame after release waits for vsync (%0d writes)", writes_in_frame), writes_in_frame == 0);
    send_frame(4);
    check_frame(4);
    check("frame_tgl toggled again", frame_tgl == t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

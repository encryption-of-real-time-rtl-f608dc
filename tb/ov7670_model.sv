// ov7670_model: behavioural model of the OV7670 camera module for the
// system testbench (not synthesizable).
//
// It accepts SCCB register writes (decoded by sccb_monitor) and, once
// RESET is high, PWDN low and COM7 = 0x04 (RGB) and COM15 = 0xD0 (RGB565)
// have been written, streams frames of W x H pixels clocked by XCLK:
// PCLK follows XCLK, outputs change on its falling edge. A frame is VSYNC
// high for one line time, VBLANK idle line times, then H lines, each with
// HREF high for 2*W PCLKs (first byte of a pixel = upper 8 bits of the
// RGB565 value) followed by HBLANK idle PCLKs. Pixel values come from
// cam_ref_pkg::pixel_value(frame, x, y); frame counts from 0.
module ov7670_model #(
  parameter int W      = 40,
  parameter int H      = 36,
  parameter int HBLANK = 16,
  parameter int VBLANK = 2
) (
  input  logic       xclk,
  input  logic       reset_n,
  input  logic       pwdn,
  input  logic       sioc,
  input  logic       siod,
  output logic       pclk,
  output logic       vsync,
  output logic       href,
  output logic [7:0] d
);
  import cam_ref_pkg::*;

  logic [7:0] regs [256];
  int         frame_no = 0;
  int         n_writes = 0;
  bit         configured;

  sccb_monitor u_mon (.sioc(sioc), .siod(siod));

  initial begin
    foreach (regs[i]) regs[i] = 8'h00;
    vsync = 0; href = 0; d = 0;
  end

  // apply register writes addressed to the camera (write ID 0x42)
  always @(posedge xclk) begin
    while (u_mon.addrs.size() > 0) begin
      logic [7:0] id, a, v;
      id = u_mon.ids.pop_front();
      a  = u_mon.addrs.pop_front();
      v  = u_mon.datas.pop_front();
      if (id == 8'h42) begin
        n_writes++;
        if (a == 8'h12 && v[7]) foreach (regs[i]) regs[i] = 8'h00;
        else regs[a] = v;
      end
    end
  end

  assign configured = reset_n && !pwdn && regs[8'h12] == 8'h04 && regs[8'h40] == 8'hD0;
  assign pclk = xclk;

  task automatic idle_clocks(int n);
    repeat (n) @(negedge xclk);
  endtask

  initial begin
    forever begin
      @(negedge xclk);
      if (configured) begin
        vsync = 1;
        idle_clocks(2 * W + HBLANK);
        vsync = 0;
        idle_clocks(VBLANK * (2 * W + HBLANK));
        for (int y = 0; y < H; y++) begin
          for (int x = 0; x < W; x++) begin
            logic [15:0] p;
            p = pixel_value(frame_no, x, y);
            href = 1; d = p[15:8];
            @(negedge xclk);
            d = p[7:0];
            @(negedge xclk);
          end
          href = 0; d = 8'h00;
          idle_clocks(HBLANK);
        end
        frame_no++;
      end
    end
  end
endmodule

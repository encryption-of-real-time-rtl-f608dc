// ov7670_capture: turns the camera's byte stream into RGB565 pixels and
// writes one IMG_W x IMG_H window of a frame into the frame buffer.
//
// Runs on the camera's pixel clock. VSYNC high marks the start of a frame
// and clears the line and pixel counters; while HREF is high the camera
// presents one byte per PCLK rising edge, two per pixel: the first byte
// holds R[4:0] G[5:3], the second G[2:0] B[4:0], so a pixel is simply
// {first, second}. The falling edge of HREF ends a line. Pixels of the top
// left IMG_W x IMG_H corner are written with wen / addr = y * IMG_W + x /
// data; the rest of the frame is dropped.
//
// Frame hand-off: after the last pixel of the window has been written,
// frame_tgl toggles and the block stops writing (holds the frame) until
// release_tgl, which comes from the reader's clock domain and is
// synchronized here, toggles. It then waits for the next VSYNC and
// captures that frame. Capture is enabled from reset. So the reader sees a
// frame that nothing overwrites while it is being read. Both toggles are
// this design's choice; cropping to the top-left corner is too, as the
// image size (32 x 32) is known but not how it is obtained from the
// camera's output.
module ov7670_capture #(
  parameter int unsigned IMG_W = 32,
  parameter int unsigned IMG_H = 32,
  localparam int unsigned AW   = $clog2(IMG_W * IMG_H)
) (
  input  logic          pclk,
  input  logic          rst_n,
  input  logic          vsync,
  input  logic          href,
  input  logic [7:0]    d,
  input  logic          release_tgl,
  output logic          wen,
  output logic [AW-1:0] addr,
  output logic [15:0]   data,
  output logic          frame_tgl
);

  localparam int unsigned XW = $clog2(IMG_W + 1);
  localparam int unsigned YW = $clog2(IMG_H + 1);

  typedef enum logic [1:0] {W_WAIT_VSYNC, W_CAPTURE, W_HOLD} cap_state_t;

  cap_state_t    state;
  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic          phase;      // 0: next byte is the first of a pixel
  logic [7:0]    first_byte;
  logic          href_q;
  logic          rel_sync, rel_seen;

  sync_2ff u_rel_sync (.clk(pclk), .rst_n, .d(release_tgl), .q(rel_sync));

  always_ff @(posedge pclk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= W_WAIT_VSYNC;
      x          <= '0;
      y          <= '0;
      phase      <= 1'b0;
      first_byte <= '0;
      href_q     <= 1'b0;
      rel_seen   <= 1'b0;
      wen        <= 1'b0;
      addr       <= '0;
      data       <= '0;
      frame_tgl  <= 1'b0;
    end else begin
      wen    <= 1'b0;
      href_q <= href;
      unique case (state)
        W_WAIT_VSYNC: begin
          if (vsync) begin
            state <= W_CAPTURE;
            x     <= '0;
            y     <= '0;
            phase <= 1'b0;
          end
        end
        W_CAPTURE: begin
          if (vsync) begin
            // a new frame started before the window was complete
            x     <= '0;
            y     <= '0;
            phase <= 1'b0;
          end else if (href) begin
            phase <= ~phase;
            if (!phase) first_byte <= d;
            else begin
              if (x < XW'(IMG_W) && y < YW'(IMG_H)) begin
                wen  <= 1'b1;
                addr <= AW'(y * IMG_W + x);
                data <= {first_byte, d};
                if (x == XW'(IMG_W - 1) && y == YW'(IMG_H - 1)) begin
                  frame_tgl <= ~frame_tgl;
                  state     <= W_HOLD;
                end
              end
              if (x < XW'(IMG_W)) x <= x + XW'(1);
            end
          end else if (href_q) begin
            // end of a line
            x     <= '0;
            phase <= 1'b0;
            if (y < YW'(IMG_H)) y <= y + YW'(1);
          end
        end
        W_HOLD: begin
          if (rel_sync != rel_seen) begin
            rel_seen <= rel_sync;
            state    <= W_WAIT_VSYNC;
          end
        end
        default: state <= W_WAIT_VSYNC;
      endcase
    end
  end

endmodule

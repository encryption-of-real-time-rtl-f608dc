// ov7670_controller: brings the camera up and writes its configuration.
//
// After reset the controller holds the camera's RESET pin low for
// RESET_HOLD clocks, waits the same time again, then walks through the
// register table (ov7670_reg_rom) and has the SCCB sender write each
// entry. After the software-reset entry (COM7 = 0x80) it waits
// RESET_WAIT clocks so the camera can restart before the next write.
// When the last entry has been written, done goes high and stays high.
// PWDN is held low (camera powered) and XCLK, the camera's input clock,
// is the system clock divided by two (25 MHz from 50 MHz); it keeps
// running during reset.
//
// Interface: sioc / siod_o / siod_oe / pwdn / cam_reset_n / xclk go to
// the camera; done is a level. The hold times, the reset wait and XCLK
// are choices of this design, taken from the camera datasheet's limits.
module ov7670_controller #(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned SCCB_HZ    = 100_000,
  parameter int unsigned RESET_HOLD = CLK_HZ / 1000,   // 1 ms
  parameter int unsigned RESET_WAIT = CLK_HZ / 1000    // 1 ms
) (
  input  logic clk,
  input  logic rst_n,
  output logic sioc,
  output logic siod_o,
  output logic siod_oe,
  output logic pwdn,
  output logic cam_reset_n,
  output logic xclk,
  output logic done
);

  localparam int unsigned WAIT_MAX = (RESET_HOLD > RESET_WAIT) ? RESET_HOLD : RESET_WAIT;
  localparam int unsigned CW       = $clog2(WAIT_MAX + 2);

  typedef enum logic [2:0] {C_HOLD, C_SETTLE, C_SEND, C_BUSY, C_WAIT, C_DONE} cstate_t;

  cstate_t       state;
  logic [CW-1:0] cnt;
  logic [3:0]    idx;
  logic [7:0]    rom_addr, rom_data;
  logic          rom_last;
  logic          s_start, s_busy, s_done;

  ov7670_reg_rom u_rom (.idx(idx), .addr(rom_addr), .data(rom_data), .last(rom_last));

  sccb_sender #(.CLK_HZ(CLK_HZ), .SCCB_HZ(SCCB_HZ)) u_sccb (
    .clk, .rst_n,
    .start (s_start), .addr(rom_addr), .data(rom_data),
    .busy  (s_busy),  .done(s_done),
    .sioc, .siod_o, .siod_oe
  );

  assign s_start = (state == C_SEND) && !s_busy;
  assign done    = (state == C_DONE);
  assign pwdn    = 1'b0;

  // XCLK runs also during reset: the camera needs it, and the pixel clock
  // it returns lets the capture logic see its reset
  always_ff @(posedge clk) xclk <= ~xclk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= C_HOLD;
      cnt         <= '0;
      idx         <= '0;
      cam_reset_n <= 1'b0;
    end else begin
      unique case (state)
        C_HOLD: begin
          cam_reset_n <= 1'b0;
          if (cnt == CW'(RESET_HOLD)) begin
            cnt         <= '0;
            cam_reset_n <= 1'b1;
            state       <= C_SETTLE;
          end else cnt <= cnt + CW'(1);
        end
        C_SETTLE: begin
          if (cnt == CW'(RESET_HOLD)) begin
            cnt   <= '0;
            state <= C_SEND;
          end else cnt <= cnt + CW'(1);
        end
        C_SEND: if (!s_busy) state <= C_BUSY;
        C_BUSY: begin
          if (s_done) begin
            if (rom_last) state <= C_DONE;
            else begin
              // the software reset needs time before the next write
              state <= (rom_addr == 8'h12 && rom_data[7]) ? C_WAIT : C_SEND;
              idx   <= idx + 4'd1;
              cnt   <= '0;
            end
          end
        end
        C_WAIT: begin
          if (cnt == CW'(RESET_WAIT)) begin
            cnt   <= '0;
            state <= C_SEND;
          end else cnt <= cnt + CW'(1);
        end
        C_DONE: ;
        default: state <= C_HOLD;
      endcase
    end
  end

endmodule

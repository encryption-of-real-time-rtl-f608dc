// ov7670_reg_rom: the table of camera register writes (register address,
// value) that the camera controller sends after power-up, read
// combinationally by index.
//
// The entries set the camera to RGB565 output, two bytes per pixel:
//   0: COM7   (0x12) = 0x80  reset all registers to their defaults
//   1: COM7   (0x12) = 0x04  RGB output format
//   2: COM15  (0x40) = 0xD0  RGB565, full 00..FF output range
//   3: RGB444 (0x8C) = 0x00  RGB444 off, so COM15 selects RGB565
// The register numbers and values come from the camera's datasheet; the
// enclosing design only states that the camera is configured for RGB565.
// last is high on the final entry.
module ov7670_reg_rom (
  input  logic [3:0] idx,
  output logic [7:0] addr,
  output logic [7:0] data,
  output logic       last
);

  localparam int unsigned N_ENTRIES = 4;

  always_comb begin
    unique case (idx)
      4'd0:    {addr, data} = {8'h12, 8'h80};
      4'd1:    {addr, data} = {8'h12, 8'h04};
      4'd2:    {addr, data} = {8'h40, 8'hD0};
      4'd3:    {addr, data} = {8'h8C, 8'h00};
      default: {addr, data} = {8'hFF, 8'hFF};
    endcase
    last = (idx == 4'(N_ENTRIES - 1));
  end

endmodule

// sccb_sender: performs one SCCB (camera control bus) 3-phase write cycle:
// device ID (write address), register address, register value.
//
// Each phase is 8 data bits, MSB first, followed by a ninth "don't care"
// bit during which the master releases SIO_D (siod_oe low; the pad's
// pull-up makes it read high). The transmission is framed by a start
// condition (SIO_D falls while SIO_C is high) and a stop condition (SIO_D
// rises while SIO_C is high). Every bit lasts four quarter periods of
// SIO_C: clock low, data changes, clock high, clock high; a quarter is
// CLK_HZ / (4 * SCCB_HZ) system clocks. All outputs are registered.
//
// Interface: start (one-cycle request while busy is low, addr and data
// sampled with it) -> busy during the cycle, done one-cycle pulse at its
// end. sioc / siod_o / siod_oe go to the camera pins; the tristate buffer
// for SIO_D is left to the pad (siod_oe low = released). A write takes
// 4 * (1 + 27 + 1) = 116 quarters, 290 us at the default 100 kHz.
//
// The camera write ID (0x42), bus frequency and bit timing follow the
// camera maker's bus definition; the enclosing design only names the
// "SCCB sender".
module sccb_sender #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned SCCB_HZ = 100_000,
  parameter logic [7:0]  DEV_ID  = 8'h42
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] addr,
  input  logic [7:0] data,
  output logic       busy,
  output logic       done,
  output logic       sioc,
  output logic       siod_o,
  output logic       siod_oe
);

  localparam int unsigned QUARTER = (CLK_HZ / (4 * SCCB_HZ)) < 1 ? 1 : CLK_HZ / (4 * SCCB_HZ);
  localparam int unsigned QW      = $clog2(QUARTER + 1);

  typedef enum logic [1:0] {S_IDLE, S_START, S_BITS, S_STOP} state_t;

  state_t        state;
  logic [QW-1:0] qcnt;      // system clocks within the current quarter
  logic [1:0]    quarter;   // quarter within the current bit
  logic [4:0]    bit_idx;   // 0..26
  logic [26:0]   shreg;     // bits still to send, MSB first
  logic [26:0]   oe_mask;   // 1 = drive the bit, 0 = release (don't care)
  logic          tick;

  assign tick = (qcnt == QW'(QUARTER - 1));
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      qcnt    <= '0;
      quarter <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      oe_mask <= '0;
      sioc    <= 1'b1;
      siod_o  <= 1'b1;
      siod_oe <= 1'b1;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state == S_IDLE) begin
        qcnt    <= '0;
        quarter <= '0;
        sioc    <= 1'b1;
        siod_o  <= 1'b1;
        siod_oe <= 1'b1;
        if (start) begin
          state   <= S_START;
          shreg   <= {DEV_ID, 1'b1, addr, 1'b1, data, 1'b1};
          oe_mask <= {8'hff, 1'b0, 8'hff, 1'b0, 8'hff, 1'b0};
          bit_idx <= '0;
        end
      end else if (tick) begin
        qcnt    <= '0;
        quarter <= quarter + 2'd1;
        unique case (state)
          S_START: begin
            // quarters 0..3: clock high with SIO_D falling, then clock low
            sioc    <= (quarter == 2'd0);
            siod_o  <= 1'b0;
            siod_oe <= 1'b1;
            if (quarter == 2'd3) state <= S_BITS;
          end
          S_BITS: begin
            unique case (quarter)
              2'd0: sioc <= 1'b0;
              2'd1: begin
                siod_o  <= shreg[26];
                siod_oe <= oe_mask[26];
              end
              2'd2: sioc <= 1'b1;
              2'd3: begin
                shreg   <= shreg << 1;
                oe_mask <= oe_mask << 1;
                bit_idx <= bit_idx + 5'd1;
                if (bit_idx == 5'd26) state <= S_STOP;
              end
            endcase
          end
          S_STOP: begin
            unique case (quarter)
              2'd0: begin
                sioc    <= 1'b0;
                siod_o  <= 1'b0;
                siod_oe <= 1'b1;
              end
              2'd1: sioc   <= 1'b1;
              2'd2: siod_o <= 1'b1;
              2'd3: begin
                state <= S_IDLE;
                done  <= 1'b1;
              end
            endcase
          end
          default: state <= S_IDLE;
        endcase
      end else begin
        qcnt <= qcnt + QW'(1);
      end
    end
  end

endmodule

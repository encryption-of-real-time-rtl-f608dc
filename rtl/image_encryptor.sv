// image_encryptor: encrypts a captured frame block by block and streams
// the cipher text out byte by byte.
//
// When a new frame is announced (frame_tgl toggles; it comes from the
// camera clock domain and is synchronized here), the controller walks the
// frame buffer in address order. For each group of 8 consecutive pixels it
// reads the 8 words (one per clock, registered RAM read), packs them into
// a 128-bit block with the first pixel in bits [127:112] and the eighth in
// [15:0], and has the AES-128 core (aes_encrypt) encrypt it with key. The
// 16 cipher bytes are then handed to the serial transmitter, bits
// [127:120] first, over a valid / ready handshake. After the last group
// it toggles release_tgl, which lets the capture logic take a new frame,
// and pulses frame_sent.
//
// Timing per block: 9 clocks to read, 1 to start AES, 11 waiting for its
// done pulse (10 round clocks plus the registered done), then 16 byte
// transfers of at least one clock each: 37 clocks when tx_ready stays
// high. With the 9600 baud link the transmitter sets the pace instead
// (16 bytes of 10 bits, about 16.7 ms per block, 2.1 s per frame).
// The key is sampled at the start of every block.
//
// Packing 8 RGB565 pixels into one AES block follows the design; the
// pixel and byte order within the block is this design's choice.
module image_encryptor #(
  parameter int unsigned NPIX = 1024,
  localparam int unsigned AW  = $clog2(NPIX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          frame_tgl,
  output logic          release_tgl,
  input  logic [127:0]  key,
  output logic [AW-1:0] raddr,
  input  logic [15:0]   rdata,
  output logic          tx_valid,
  output logic [7:0]    tx_data,
  input  logic          tx_ready,
  output logic          frame_sent,
  output logic          busy
);

  typedef enum logic [2:0] {E_IDLE, E_READ, E_AES_START, E_AES_WAIT, E_SEND} enc_state_t;

  enc_state_t      state;
  logic            frame_sync, frame_seen;
  logic [AW-1:0]   pix;          // next pixel address to read
  logic [3:0]      nread;        // words received for the current block
  logic            rd_pending;   // a read was issued last clock
  logic [127:0]    block;
  logic [3:0]      byte_idx;
  logic            last_block;

  logic            aes_start, aes_busy, aes_done;
  logic [127:0]    cipher, cipher_q;

  sync_2ff u_frame_sync (.clk, .rst_n, .d(frame_tgl), .q(frame_sync));

  aes_encrypt u_aes (
    .clk, .rst_n,
    .start (aes_start), .plain(block), .key(key),
    .busy  (aes_busy),  .done(aes_done), .cipher(cipher), .dstate()
  );

  assign aes_start = (state == E_AES_START);
  assign raddr     = pix;
  assign tx_valid  = (state == E_SEND);
  assign tx_data   = cipher_q[127 - 8*byte_idx -: 8];
  assign busy      = (state != E_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= E_IDLE;
      frame_seen  <= 1'b0;
      pix         <= '0;
      nread       <= '0;
      rd_pending  <= 1'b0;
      block       <= '0;
      byte_idx    <= '0;
      last_block  <= 1'b0;
      cipher_q    <= '0;
      release_tgl <= 1'b0;
      frame_sent  <= 1'b0;
    end else begin
      frame_sent <= 1'b0;
      unique case (state)
        E_IDLE: begin
          if (frame_sync != frame_seen) begin
            frame_seen <= frame_sync;
            pix        <= '0;
            nread      <= '0;
            rd_pending <= 1'b0;
            state      <= E_READ;
          end
        end
        E_READ: begin
          // issue reads for 8 addresses; each word arrives one clock later
          rd_pending <= (nread + 4'(rd_pending) < 4'd8);
          if (rd_pending) begin
            block <= {block[111:0], rdata};
            nread <= nread + 4'd1;
            if (nread == 4'd7) state <= E_AES_START;
          end
          if (nread + 4'(rd_pending) < 4'd8) begin
            last_block <= (pix == AW'(NPIX - 1));
            pix        <= pix + AW'(1);
          end
        end
        E_AES_START: state <= E_AES_WAIT;
        E_AES_WAIT: begin
          if (aes_done) begin
            cipher_q <= cipher;
            byte_idx <= '0;
            state    <= E_SEND;
          end
        end
        E_SEND: begin
          if (tx_ready) begin
            byte_idx <= byte_idx + 4'd1;
            if (byte_idx == 4'd15) begin
              if (last_block) begin
                release_tgl <= ~release_tgl;
                frame_sent  <= 1'b1;
                state       <= E_IDLE;
              end else begin
                nread      <= '0;
                rd_pending <= 1'b0;
                state      <= E_READ;
              end
            end
          end
        end
        default: state <= E_IDLE;
      endcase
    end
  end

  // the core is only started when it is idle
  a_aes_idle_on_start: assert property (@(posedge clk) disable iff (!rst_n)
    aes_start |-> !aes_busy);

  if (NPIX % 8 != 0) begin : g_bad_npix
    $error("image_encryptor: NPIX must be a multiple of 8");
  end

endmodule

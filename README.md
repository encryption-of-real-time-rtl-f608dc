# Real-time camera image encryption with AES-128

This is an FPGA design that takes pictures from an OV7670 CMOS camera, encrypts them with
AES-128 and sends the cipher text over a 9600 baud serial link to a ZigBee radio module. It
follows a published design: an AES image-encryption system on a Spartan-6 board. The image is
32 x 32 pixels of RGB565, 16 bits per pixel. The encryption unit is AES's 128-bit block, and eight
pixels fill one block exactly. A frame is therefore 128 AES blocks, or 2048 cipher bytes on the link.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017). It has no vendor primitives. The frame
buffer is a plain array that maps onto block RAM.

## Data path

```
            SCCB (sioc, siod)            ┌──────────────────────────────────────────┐
 OV7670 ◄────────────────────────────────┤ ov7670_controller                        │
 camera      pwdn, reset_n, xclk         │   ov7670_reg_rom ─► sccb_sender          │
   │                                     └──────────────────────────────────────────┘
   │ pclk, vsync, href, d[7:0]
   ▼
 ov7670_capture ──wen/addr/data──► frame_buffer ──raddr/rdata──► image_encryptor ──► uart_tx ──► ZigBee
   (pclk domain)                  (dual-port RAM)                 │  aes_encrypt      (9600 8N1)
        ▲        frame_tgl ───────────────────────────────────────►│
        └──────────────────────────────────────────── release_tgl ┘
```

`image_encryption_top` wires these blocks together. Two clocks run in it:

- `clk` is the system clock, 50 MHz by default. It runs the camera controller, the encryptor
  and the transmitter, and it reads the frame buffer.
- `cam_pclk` is the camera's pixel clock. It runs the capture logic and writes the frame buffer.

## The AES-128 core (`aes_encrypt`)

The core encrypts one 128-bit block in ten clocks, one AES round per clock. A single copy of the
round logic is reused for every round.

**State layout.** The 16 state bytes are column-major. Byte 0 (row 0, column 0) sits in bits
[127:120], byte 1 (row 1, column 0) in [119:112], and byte 15 in [7:0]. A 128-bit value written
as hex, such as `00112233...`, is therefore in the usual AES byte order. All functions in
`aes_pkg` and the step modules use this layout.

**Steps.** Each step is its own combinational module:

| module | step |
|---|---|
| `aes_sbox` | S-box for one byte. The 256-entry table is computed at elaboration from the GF(2^8) inverse and the affine transform. Synthesis sees a constant lookup table. |
| `aes_sub_bytes` | 16 S-boxes, one per byte. |
| `aes_shift_rows` | Rotates row r left by r bytes. This is only wiring. |
| `aes_mix_columns` | Multiplies each column by the matrix `02 03 01 01 / 01 02 03 01 / 01 01 02 03 / 03 01 01 02` modulo 0x11B, using `xtime`. |
| `aes_add_round_key` | XORs the state with the round key. |
| `aes_key_expansion` | Makes round key i+1 from round key i: RotWord, SubWord (4 S-boxes), Rcon, then the chain of XORs. |

**Round schedule.**

```
start edge : state <= plain ^ key          rkey <= key         round <= 1
round r    : rk'   = expand(rkey, Rcon(r))
             state <= AddRoundKey(MixColumns?(ShiftRows(SubBytes(state))), rk')
             rkey  <= rk'                                       (MixColumns skipped in round 10)
```

The round keys are never stored. The key register advances one expansion step per round, in the
same cycle that uses the new key. The critical path is therefore an S-box in the key expansion,
then XORs into AddRoundKey, in parallel with SubBytes, ShiftRows and MixColumns on the state.

**Interface and timing.**

- `start` is honoured only while `busy` is low. `plain` and `key` are sampled with it.
- `dstate` shows the round being computed (1 to 10), and 0 when idle.
- `done` pulses at the tenth rising edge after the edge that sampled `start`.
- `cipher` then holds the result until the next start.

The core has been checked against the FIPS-197 example, against random blocks, and against the
system's example below.

| | |
|---|---|
| plain text | `12aabb223344556677889900aabbccee` |
| key | `aabbccddeeff12345678901234567890` |
| cipher text | `3ac215d1f6d1f25e2e8ac485d8f73072` |

## From camera bytes to AES blocks

**Capture** (`ov7670_capture`, pixel-clock domain). VSYNC high starts a frame. While HREF is
high, the camera delivers two bytes per pixel: R[4:0]G[5:3], then G[2:0]B[4:0]. The pixel is
simply `{first, second}`. Pixels in the top-left `IMG_W x IMG_H` window are written to address
`y*IMG_W + x`. Everything else the camera sends is dropped, so any camera resolution of at least
32 x 32 works.

**Frame hand-off.** A frame must not be overwritten while it is being encrypted. After writing
the window's last pixel, the capture logic:

1. toggles `frame_tgl`;
2. stops writing, holding the frame;
3. waits for `release_tgl` from the encryptor to toggle;
4. then waits for the next VSYNC and captures that frame.

Both toggles cross clock domains through two-flip-flop synchronizers (`sync_2ff`). Frames that
arrive while a frame is held are skipped. The pixel-clock domain also gets its own synchronized
reset.

**Encryption** (`image_encryptor`). For each group of eight consecutive addresses, the encryptor:

1. reads the words, one per clock, from the registered-read RAM;
2. packs them first-pixel-in-bits-[127:112];
3. runs `aes_encrypt`;
4. hands the 16 cipher bytes to the transmitter, bits [127:120] first, over a valid/ready
   handshake.

After the last group it toggles `release_tgl` and pulses `frame_sent`. With a transmitter that is
always ready, a block takes 37 clocks: 9 read, 1 start, 11 waiting for `done`, and 16 send. At
the real link rate the transmitter sets the pace.

## Throughput of the link

`uart_tx` sends 8N1 frames, LSB first, with the line idle high. At 9600 baud and 50 MHz a bit
is 5208 clocks and a byte 1.04 ms. One 32 x 32 frame is 2048 bytes, so it takes about 2.13 s on
the link, against 128 x 37 = 4736 clocks (95 µs) of encryption. The system can therefore send
about one encrypted picture every 2.1 s. The camera keeps streaming in the meantime, and the
frames it sends while the link is busy are discarded.

## Camera configuration

After reset, `ov7670_controller`:

1. holds the camera's RESET pin low for 1 ms, then waits 1 ms;
2. writes the table in `ov7670_reg_rom` over SCCB, with a 1 ms pause after the software reset;
3. raises `config_done`.

| register | value | effect |
|---|---|---|
| COM7 (0x12) | 0x80 | reset all registers |
| COM7 (0x12) | 0x04 | RGB output |
| COM15 (0x40) | 0xD0 | RGB565, full output range |
| RGB444 (0x8C) | 0x00 | RGB444 off |

`sccb_sender` performs the three-phase write cycle:

- The phases are the device ID 0x42, the register address and the value.
- Each phase is 8 bits, MSB first, followed by a ninth bit in which SIO_D is released.
- The cycle is framed by start and stop conditions.
- SIO_C runs at `SCCB_HZ`, 100 kHz by default.

SIO_D comes out as `cam_siod_o` plus an enable, `cam_siod_oe`, for a tristate pad with a pull-up.
The controller also drives XCLK at half the system clock (25 MHz) and holds PWDN low.

XCLK keeps running during reset, for a reason. The capture logic's reset is the system reset
passed through a synchronizer clocked by the camera's PCLK, and the camera derives PCLK from
XCLK. If you replace the camera or its clocking, make sure PCLK runs while `rst_n` is low.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `image_encryption_top` | `CLK_HZ` | 50 000 000 | system clock frequency |
| | `BAUD` | 9600 | serial rate to the radio module |
| | `SCCB_HZ` | 100 000 | camera control bus clock |
| | `IMG_W`, `IMG_H` | 32, 32 | image window. `IMG_W*IMG_H` must be a multiple of 8. A power of two keeps the buffer full. |
| `ov7670_controller` | `RESET_HOLD`, `RESET_WAIT` | `CLK_HZ/1000` | camera reset pulse and post-reset pause, in clocks |
| `frame_buffer` | `DEPTH`, `WIDTH` | 1024, 16 | set from the image size by the top |

## Where the design fills in or departs from the published description

The following follow the published description:

- the block structure (camera controller with SCCB sender and register values, capture logic,
  dual-port frame buffer, encryption module, ZigBee link);
- AES-128 with 10 rounds and the step definitions;
- the RGB565 byte layout;
- the 32 x 32 image;
- eight pixels per block;
- 9600 baud;
- the test vector.

The following are this design's own choices:

- the system clock frequency;
- the SCCB rate and the camera register values (taken from the camera's data sheet);
- the camera reset timing and XCLK frequency;
- cropping the camera frame to its top-left corner to get 32 x 32;
- the frame hold/release protocol and the clock-domain crossings;
- pixel order inside a block and byte order on the link;
- the 8N1 serial format;
- one round per clock with on-the-fly key expansion;
- the start/done handshakes;
- active-low asynchronous resets.

Not included:

- The VGA monitor output of the original set-up. Its resolution, timing and data path are not
  specified.
- AES decryption and the 192- and 256-bit key sizes. The system uses AES-128 encryption only.
- The receiving side of the radio link.
- The camera, the radio module and the board, which are bought-in parts.

The key is a top-level input. How it is loaded is left to the integrator.

## Simulation

Every module has a self-checking testbench in `tb/<module>_tb.sv`. Each prints
`TB_RESULT checks=N failures=M`. The reference model `tb/aes_ref_pkg.sv` is independent of the
RTL. It uses the published S-box table, a generic GF(2^8) multiply, and an up-front key schedule.
The system tests use three more testbench parts:

- `tb/ov7670_model.sv`, a behavioural camera. It decodes SCCB writes and streams 40 x 36 frames
  once it has been set to RGB565.
- `tb/cam_ref_pkg.sv`, the camera's test pattern.
- `tb/top_checker.sv`. It decodes the serial line, works out which camera frame was captured,
  checks every cipher byte, and counts each mechanism: register writes, the camera reset,
  cropping, skipped frames, AES blocks, transmitter back-pressure and frames sent.

| testbench | what runs |
|---|---|
| `image_encryption_top_tb` | Whole system at a 960 kHz clock (100 clocks per serial bit) and the full 32 x 32 image. Two frames. About 4 M clocks, a few seconds. |
| `image_encryption_top_full_tb` | Whole system with every default: one complete frame. About 107 M clocks, under 2 minutes. |
| `aes_encrypt_tb` | FIPS-197 and the example vector, 100 random blocks, latency, `dstate`, and a start while busy. |
| others | one per block. |

The simulator needs `--timing`. Any testbench runs like this:

```
verilator --binary --timing --assert -Irtl -Itb rtl/aes_pkg.sv \
    tb/aes_ref_pkg.sv tb/cam_ref_pkg.sv tb/image_encryption_top_tb.sv \
    --top-module image_encryption_top_tb
./obj_dir/Vimage_encryption_top_tb
```

Give the packages the testbench uses on the command line, before it. `-Irtl -Itb` lets Verilator
find the other modules by file name. For lint, use
`verilator --lint-only -Wall -Irtl rtl/aes_pkg.sv rtl/image_encryption_top.sv`.

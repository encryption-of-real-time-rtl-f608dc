// image_encryptor_tb: a behavioural frame buffer (registered read) holds
// a random image; a frame toggle starts the encryptor. The bytes it hands
// out, under random tx_ready back-pressure, must be the AES-128 encryption
// (reference model) of the image taken 8 pixels at a time, first pixel in
// the top bits, cipher sent most significant byte first. Also checks
// frame_sent / release_tgl at the end, that a second frame is encrypted
// with a new key, and 37 clocks per block when tx_ready stays high.
module image_encryptor_tb;
  import aes_ref_pkg::*;
  localparam int NPIX = 1024;
  logic clk = 0, rst_n = 0;
  logic frame_tgl = 0, release_tgl;
  logic [127:0] key;
  logic [9:0] raddr;
  logic [15:0] rdata;
  logic tx_valid, tx_ready = 0, frame_sent, busy;
  logic [7:0] tx_data;
  logic [15:0] img [NPIX];
  logic [7:0] got[$];
  int frame_sent_count = 0;
  int stalls = 0;
  int checks = 0, failures = 0;
  bit random_ready = 1;
  always #5 clk = ~clk;

  image_encryptor #(.NPIX(NPIX)) dut (.*);

  always @(posedge clk) rdata <= img[raddr];
  always @(posedge clk) if (rst_n) begin
    if (tx_valid && tx_ready) got.push_back(tx_data);
    if (tx_valid && !tx_ready) stalls++;
    if (frame_sent) frame_sent_count++;
  end
  always @(negedge clk) tx_ready <= random_ready ? ($urandom_range(3) != 0) : 1'b1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_frame(logic [127:0] k);
    int bad = 0;
    logic rel0 = release_tgl;
    int fs0 = frame_sent_count;
    foreach (img[i]) img[i] = 16'($urandom);
    key = k;
    got.delete();
    @(negedge clk);
    frame_tgl = ~frame_tgl;
    wait (frame_sent_count == fs0 + 1);
    repeat (5) @(posedge clk);
    check($sformatf("%0d bytes", got.size()), got.size() == NPIX * 2);
    for (int b = 0; b < NPIX / 8 && got.size() == NPIX * 2; b++) begin
      logic [127:0] pt, ct, exp_ct;
      for (int i = 0; i < 8; i++) pt[127 - 16*i -: 16] = img[8*b + i];
      for (int i = 0; i < 16; i++) ct[127 - 8*i -: 8] = got[16*b + i];
      exp_ct = ref_encrypt(pt, k);
      if (ct !== exp_ct) begin
        bad++;
        if (bad < 4) $display("block %0d: %032h expected %032h", b, ct, exp_ct);
      end
    end
    check($sformatf("%0d wrong blocks", bad), bad == 0);
    check("release toggled", release_tgl != rel0);
    check("idle after frame", !busy);
  endtask

  initial begin
    int t_prev, n_blocks;
    key = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    check("idle without a frame", !busy && !tx_valid);
    run_frame(128'haabbccddeeff12345678901234567890);
    run_frame({$urandom, $urandom, $urandom, $urandom});
    check($sformatf("back-pressure seen %0d times", stalls), stalls > 0);
    // rate with an always-ready transmitter
    random_ready = 0;
    foreach (img[i]) img[i] = 16'($urandom);
    @(negedge clk);
    frame_tgl = ~frame_tgl;
    t_prev = 0; n_blocks = 0;
    for (int c = 0; n_blocks < 10 && c < 2000; c++) begin
      @(posedge clk);
      if (tx_valid && tx_ready && dut.byte_idx == 0) begin
        if (t_prev != 0) check($sformatf("block period %0d", c - t_prev), c - t_prev == 37);
        t_prev = c;
        n_blocks++;
      end
    end
    check("blocks seen", n_blocks == 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

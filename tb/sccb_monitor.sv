// sccb_monitor: testbench decoder for SCCB write cycles.
//
// Watches the SIO_C / SIO_D lines (siod is the resolved line level, pulled
// high when nobody drives it). A start condition is SIO_D falling while
// SIO_C is high, a stop condition SIO_D rising while SIO_C is high; data
// bits are sampled on SIO_C rising edges. A complete write is 27 bits
// (ID, don't care, address, don't care, data, don't care) plus the SIO_C
// rise that precedes the stop condition, 28 rises in all; each one is
// appended to the queues ids / addrs / datas. Cycles with a bit count
// other than 28 are counted in bad_cycles. min_half_ps records the
// shortest SIO_C high or low time seen.
module sccb_monitor (
  input logic sioc,
  input logic siod
);
  logic [7:0]  ids[$], addrs[$], datas[$];
  int          bad_cycles = 0;
  bit          in_cycle = 0;
  int          nbits = 0;
  logic [27:0] bits;
  time         last_edge = 0;
  time         min_half_ps = 0;

  always @(negedge siod) if (sioc && $time > 0) begin
    in_cycle = 1;
    nbits    = 0;
  end

  always @(posedge siod) if (sioc && in_cycle) begin
    in_cycle = 0;
    if (nbits == 28) begin
      ids.push_back(bits[27:20]);
      addrs.push_back(bits[18:11]);
      datas.push_back(bits[9:2]);
    end else begin bad_cycles++; $display("sccb_monitor: cycle of %0d bits", nbits); end
  end

  always @(posedge sioc) if (in_cycle) begin
    bits = {bits[26:0], siod};
    nbits++;
  end

  always @(sioc) begin
    if (last_edge != 0 && (min_half_ps == 0 || $time - last_edge < min_half_ps))
      min_half_ps = $time - last_edge;
    last_edge = $time;
  end
endmodule

// ldemux: synchronous decompressor of one link.
//
// Rebuilds the 24-bit hit vector of every bunch crossing from the packet
// stream of an lmux. A packet arriving in clock a with delay d belongs to the
// BX that the receiver tags a-d; its 4 bits are ORed into that BX's frame in a
// ring of 16 frames. A frame is complete once MAX_DELAY clocks have passed, so
// the frame tagged b is read out (and cleared) at the edge ending clock
// b+MAX_DELAY+1 and is on frame_o during clock b+MAX_DELAY+2. Every BX thus
// reaches the output with the same delay, which is the constant latency the
// compression costs. The end-of-data flag is not needed here.
//
// Decompression with a constant delay follows the described algorithm; the
// ring and the read-out point are this design's.
module ldemux
  import rpc_ro_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  packet_t pkt_i,
  input  logic    pkt_valid_i,
  output hits_t   frame_o     // hits of one BX, MAX_DELAY+2 clocks after its tag
);

  localparam int unsigned RING = 16;
  localparam int unsigned RW   = $clog2(RING);

  hits_t         ring [RING];
  logic [RW-1:0] now;
  logic [RW-1:0] wslot, rslot;

  assign wslot = now - RW'(pkt_i.delay);
  assign rslot = now - RW'(MAX_DELAY + 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now     <= '0;
      frame_o <= '0;
      for (int i = 0; i < RING; i++) ring[i] <= '0;
    end else begin
      now     <= now + RW'(1);
      frame_o <= ring[rslot];
      ring[rslot] <= '0;
      if (pkt_valid_i)
        ring[wslot][pkt_i.pnum*PART_BITS +: PART_BITS] <=
          ring[wslot][pkt_i.pnum*PART_BITS +: PART_BITS] | pkt_i.data;
    end
  end

  // A packet never refers to the frame being read out (delay <= MAX_DELAY).
  a_pnum_range : assert property (@(posedge clk) disable iff (!rst_n)
    pkt_valid_i |-> (pkt_i.pnum < PNUM_BITS'(N_PART)));

endmodule

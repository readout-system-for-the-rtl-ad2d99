// lmux: synchronous compressor of one link (link multiplexer).
//
// Every clock is one bunch crossing (BX). The 24 hit bits of the BX are cut
// into 6 partitions of 4 bits; a BX with at least one hit is queued together
// with its time stamp. Each clock the compressor sends one packet: the lowest
// still unsent non-empty partition of the oldest queued BX, with its partition
// number, the number of clocks it has waited (delay) and, on the last
// partition of that BX, the end-of-data flag. A receiver recovers the BX of a
// packet as its arrival time minus the delay, so the whole link adds a
// constant latency only.
//
// Compression with partitions, delay and a fixed extra latency follows the
// described algorithm. Its loss rules are this design's: a queued BX whose
// partitions would need a delay above MAX_DELAY is dropped (the clock in which
// it is found sends no packet, lost_o pulses), and a BX arriving
// at a full queue is dropped too.
//
// Timing: hits_i is sampled at the clock edge ending BX t; its first packet
// leaves pkt_o (registered) d+2 clocks later with delay field d.
module lmux
  import rpc_ro_pkg::*;
#(
  parameter int unsigned QDEPTH = 8  // queued BXs
) (
  input  logic    clk,
  input  logic    rst_n,
  input  hits_t   hits_i,       // hits of the current BX
  output packet_t pkt_o,        // packet on the link
  output logic    pkt_valid_o,  // packet present (else idle)
  output logic    lost_o        // pulse: one BX's remaining data dropped
);

  localparam int unsigned QW = $clog2(QDEPTH);
  localparam int unsigned TW = 4;  // time stamp bits, enough for ages up to 15

  hits_t         q_hits [QDEPTH];
  logic [TW-1:0] q_ts   [QDEPTH];
  logic [QW-1:0] rd_ptr, wr_ptr;
  logic [QW:0]   count;
  logic [TW-1:0] now;

  // Head of the queue
  hits_t                 head;
  logic [TW-1:0]         age;
  logic                  head_old;
  logic [PNUM_BITS-1:0]  sel;
  logic                  found;
  hits_t                 rest;
  logic                  send, pop, push, drop_new;

  always_comb begin
    head     = q_hits[rd_ptr];
    age      = now - q_ts[rd_ptr] - TW'(1);
    head_old = (count != 0) && (age > TW'(MAX_DELAY));
    sel      = '0;
    found    = 1'b0;
    for (int p = N_PART - 1; p >= 0; p--) begin
      if (head[p*PART_BITS +: PART_BITS] != '0) begin
        sel   = PNUM_BITS'(p);
        found = 1'b1;
      end
    end
    rest = head;
    rest[sel*PART_BITS +: PART_BITS] = '0;
    send     = (count != 0) && !head_old && found;
    pop      = head_old || (send && (rest == '0));
    push     = (hits_i != '0) && ((count < (QW+1)'(QDEPTH)) || pop);
    drop_new = (hits_i != '0) && !push;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr      <= '0;
      wr_ptr      <= '0;
      count       <= '0;
      now         <= '0;
      pkt_o       <= '0;
      pkt_valid_o <= 1'b0;
      lost_o      <= 1'b0;
    end else begin
      now <= now + TW'(1);
      if (send) begin
        q_hits[rd_ptr] <= rest;
      end
      if (push) begin
        q_hits[wr_ptr] <= hits_i;
        q_ts[wr_ptr]   <= now;
        wr_ptr         <= wr_ptr + QW'(1);
      end
      if (pop) rd_ptr <= rd_ptr + QW'(1);
      count <= count + (QW+1)'(push) - (QW+1)'(pop);

      pkt_valid_o <= send;
      pkt_o.data  <= head[sel*PART_BITS +: PART_BITS];
      pkt_o.pnum  <= sel;
      pkt_o.delay <= age[DELAY_BITS-1:0];
      pkt_o.eod   <= (rest == '0);
      lost_o      <= head_old || drop_new;
    end
  end

  // The queue never holds an empty BX, so a head that is not too old always
  // has a partition to send.
  a_head_nonempty : assert property (@(posedge clk) disable iff (!rst_n)
    (count != 0 && !head_old) |-> found);

endmodule

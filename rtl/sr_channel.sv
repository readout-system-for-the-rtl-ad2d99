// sr_channel: one derandomizer channel of a Slave Readout Board.
//
// It takes the compressed packet stream of one optical link and keeps the
// packets of every bunch crossing (BX) for the trigger latency:
//  * Data analyzer: a packet arriving in local clock a with delay d belongs
//    to BX tag b = a-d (the decompression rule of the link).
//  * Length pipeline: a ring of DEPTH counters, one per BX tag, counts the
//    packets of each BX; the counter of the next BX is cleared every clock.
//  * Data pipeline: a ring memory of DEPTH x SLOTS packets; packet n of BX b
//    is written at address {b, n}.
//  * On L1Accept in clock t the triggered tag t-L1_LAT is queued. A copy
//    engine moves the packets of the queued BX, one per clock, into the page
//    (event number mod PAGES) of the data buffer and then writes the packet
//    count into the data length buffer of that page. events_done_o counts
//    the pages written, so page k is complete once events_done_o > k.
//  * Data buffer and data length buffer form the dual-port memory: the second
//    port is the local readout bus side, read with one clock of latency.
// Storing every event in a fixed page together with its packet count, so that
// one event sits at the same address in all channels, follows the described
// principle. The ring sizes, the L1Accept queue and the copy engine are this
// design's. A queued BX must be copied before its ring slot is reused:
// L1_LAT + (queued events x 10 clocks) < DEPTH. With SLOTS packet slots a BX
// of more than SLOTS packets keeps its first SLOTS (an lmux sends at most 6).
//
// Read port: rd_len_i=1 returns the count of page rd_page_i, else packet
// rd_word_i of that page in bits [10:0]; rd_data_o is valid one clock later.
// Its upper bits are always zero (count and packet are narrower than a bus
// word); they are kept so that the bus carries whole 16-bit words.
module sr_channel
  import rpc_ro_pkg::*;
#(
  parameter int unsigned DEPTH  = 256,  // BX tags held (power of 2)
  parameter int unsigned L1_LAT = 128,  // clocks from BX tag to L1Accept
  parameter int unsigned PAGES  = SRB_PAGES,
  parameter int unsigned PEND   = 8     // queued L1Accepts
) (
  input  logic        clk,
  input  logic        rst_n,
  input  packet_t     pkt_i,
  input  logic        pkt_valid_i,
  input  logic        l1a_i,
  input  logic [$clog2(PAGES)-1:0] rd_page_i,
  input  logic        rd_len_i,
  input  logic [$clog2(SLOTS)-1:0] rd_word_i,
  output word_t       rd_data_o,
  output logic [15:0] events_done_o,
  output logic        ovf_o          // sticky: an L1Accept found the queue full
);

  localparam int unsigned DW = $clog2(DEPTH);
  localparam int unsigned SW = $clog2(SLOTS);
  localparam int unsigned CW = $clog2(SLOTS + 1);
  localparam int unsigned PW = $clog2(PAGES);
  localparam int unsigned QW = $clog2(PEND);

  typedef enum logic [1:0] {S_IDLE, S_COPY, S_FINISH} state_t;

  // Time and data analyzer
  logic [DW-1:0] now;
  logic [DW-1:0] tag;
  assign tag = now - DW'(pkt_i.delay);

  // Length and data pipelines
  logic [CW-1:0] len_pipe [DEPTH];
  packet_t       data_pipe [DEPTH*SLOTS];

  // L1Accept queue
  logic [DW-1:0] pend_q [PEND];
  logic [QW-1:0] pq_rd, pq_wr;
  logic [QW:0]   pq_cnt;

  // Copy engine
  state_t        state;
  logic [DW-1:0] cur_tag;
  logic [CW-1:0] cur_cnt, idx;
  logic          rd_v;
  logic [SW-1:0] rd_idx;
  packet_t       rd_q;
  logic [PW-1:0] page;

  // Derandomizer buffers (dual-port memory)
  packet_t       dbuf [PAGES*SLOTS];
  logic [CW-1:0] lbuf [PAGES];

  logic pq_push, pq_pop;
  assign pq_pop  = (state == S_IDLE) && (pq_cnt != 0);
  assign pq_push = l1a_i && ((pq_cnt < (QW+1)'(PEND)) || pq_pop);
  assign page    = events_done_o[PW-1:0];

  // Time base, length pipeline, L1Accept queue and copy engine control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now           <= '0;
      pq_rd         <= '0;
      pq_wr         <= '0;
      pq_cnt        <= '0;
      state         <= S_IDLE;
      cur_tag       <= '0;
      cur_cnt       <= '0;
      idx           <= '0;
      rd_v          <= 1'b0;
      rd_idx        <= '0;
      events_done_o <= '0;
      ovf_o         <= 1'b0;
      for (int i = 0; i < DEPTH; i++) len_pipe[i] <= '0;
    end else begin
      now <= now + DW'(1);
      len_pipe[now + DW'(1)] <= '0;
      if (pkt_valid_i && len_pipe[tag] < CW'(SLOTS))
        len_pipe[tag] <= len_pipe[tag] + CW'(1);

      if (pq_push) begin
        pend_q[pq_wr] <= now - DW'(L1_LAT);
        pq_wr         <= pq_wr + QW'(1);
      end
      if (l1a_i && !pq_push) ovf_o <= 1'b1;
      if (pq_pop) pq_rd <= pq_rd + QW'(1);
      pq_cnt <= pq_cnt + (QW+1)'(pq_push) - (QW+1)'(pq_pop);

      rd_v <= 1'b0;
      unique case (state)
        S_IDLE: if (pq_pop) begin
          cur_tag <= pend_q[pq_rd];
          cur_cnt <= len_pipe[pend_q[pq_rd]];
          idx     <= '0;
          state   <= S_COPY;
        end
        S_COPY: if (idx < cur_cnt) begin
          rd_v   <= 1'b1;
          rd_idx <= idx[SW-1:0];
          idx    <= idx + CW'(1);
        end else begin
          state <= S_FINISH;
        end
        S_FINISH: begin
          events_done_o <= events_done_o + 16'd1;
          state         <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Data pipeline: written by the analyzer, read by the copy engine
  always_ff @(posedge clk) begin
    if (pkt_valid_i && len_pipe[tag] < CW'(SLOTS))
      data_pipe[{tag, len_pipe[tag][SW-1:0]}] <= pkt_i;
    rd_q <= data_pipe[{cur_tag, idx[SW-1:0]}];
  end

  // Data buffer and data length buffer, port A: copy engine
  always_ff @(posedge clk) begin
    if (rd_v) dbuf[{page, rd_idx}] <= rd_q;
    if (state == S_FINISH) lbuf[page] <= cur_cnt;
  end

  // Port B: local readout bus
  always_ff @(posedge clk) begin
    if (rd_len_i) rd_data_o <= word_t'(lbuf[rd_page_i]);
    else          rd_data_o <= mk_dat(dbuf[{rd_page_i, rd_word_i}]);
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
    l1a_i |-> pq_push)
    else $error("sr_channel: L1Accept queue overflow");

endmodule

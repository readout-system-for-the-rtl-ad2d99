// mrb: Master Readout Board of one trigger crate (concentrator / common data
// packer with its event data buffer).
//
// The board counts L1Accepts (event number) and bunch crossings (BX counter,
// reset by the TTC orbit signal bc0_i) and forwards the L1Accept to the
// Slave Readout Boards over the local readout bus, one clock later. For every
// event k, once every SRB reports page k complete, it builds the crate event
// in page k mod MPAGES of its event data buffer:
//   event header (event number), BX header (BX counter at the L1Accept),
//   then for every non-empty link, in board and channel order, a link header
//   with the packet count followed by the packets.
// The SRBs are read over the pipelined local bus: one request per clock, data
// back on the next clock. The count request of the next link goes out in the
// clock in which the previous link's last answer (its zero count or its last
// packet) comes back, so an empty link costs one clock and a link with n
// packets n+1 clocks. The length of the crate event is stored
// beside the page. ev_done_o counts finished crate events; the event buffer
// is read through the second port (ev_rd_*), one clock of latency, by the
// DAQ MRB's merger, which reports in merged_i how many events it has taken:
// at most MPAGES events are held.
// Concentration of the SRB pages into a crate event, the pipelined local bus
// and the stored event and BX numbers follow the description; the word
// format, the order of reading and the flow control are this design's.
// Two modes, as on the prototype board: with ttc_mode_i high (working with
// the TTC system) the event and BX headers are written; with it low
// (autonomous running with an external trigger) the crate event holds only
// the link headers and packets. ttc_mode_i is a configuration input, read
// when an event is started; change it only while no event is pending.
// ovf_o is set when more than SRB_PAGES events are pending, i.e. an SRB page
// may have been overwritten before it was read.
module mrb
  import rpc_ro_pkg::*;
#(
  parameter int unsigned N_SRB      = 3,
  parameter int unsigned N_CH       = 8,
  parameter int unsigned CRATE_ID   = 0,
  parameter int unsigned MPAGES     = 8,
  parameter int unsigned PAGE_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // TTC
  input  logic        l1a_i,
  input  logic        bc0_i,
  input  logic        ttc_mode_i,   // 1: store event and BX numbers
  // local readout bus
  input  logic [15:0] srb_done_i [N_SRB],
  output lb_req_t     lb_req_o,
  input  word_t       lb_rdata_i,
  input  logic        lb_rvalid_i,
  output logic        lb_l1a_o,
  // event data buffer, read side
  input  logic [15:0] merged_i,
  input  logic [$clog2(MPAGES)-1:0]     ev_rd_page_i,
  input  logic [$clog2(PAGE_WORDS)-1:0] ev_rd_addr_i,
  input  logic        ev_rd_len_i,
  output word_t       ev_rd_data_o,
  output logic [15:0] ev_done_o,
  output logic        ovf_o
);

  localparam int unsigned MW = $clog2(MPAGES);
  localparam int unsigned AW = $clog2(PAGE_WORDS);
  localparam int unsigned SPW = $clog2(SRB_PAGES);

  typedef enum logic [2:0] {
    M_IDLE, M_HDR, M_REQ_LEN, M_WAIT_LEN, M_DATA, M_DONE
  } mstate_t;

  mstate_t        state;
  logic [11:0]    bx;
  logic [15:0]    l1a_cnt;
  logic [11:0]    bxmem [SRB_PAGES];
  logic [2:0]     s_idx, c_idx;
  logic [3:0]     cnt, issued, recvd;
  logic [AW:0]    waddr;
  logic [MW-1:0]  mpage;
  logic [SPW-1:0] spage;
  logic           srb_ready, space, last_link;
  logic [5:0]     link_id;
  logic [2:0]     nxt_s, nxt_c;   // next link
  logic           link_end;       // last answer of the current link is on the bus
  logic           go_next;        // request the next link's count now

  word_t          ebuf [MPAGES*PAGE_WORDS];
  logic [AW:0]    lenmem [MPAGES];
  logic           we;
  logic [AW-1:0]  wa;
  word_t          wd;

  assign mpage     = ev_done_o[MW-1:0];
  assign spage     = ev_done_o[SPW-1:0];
  assign space     = (ev_done_o - merged_i) < 16'(MPAGES);
  assign last_link = (s_idx == 3'(N_SRB - 1)) && (c_idx == 3'(N_CH - 1));
  assign link_id   = 6'(CRATE_ID * N_SRB * N_CH) + 6'(s_idx) * 6'(N_CH) + 6'(c_idx);

  always_comb begin
    if (c_idx == 3'(N_CH - 1)) begin
      nxt_s = s_idx + 3'd1;
      nxt_c = '0;
    end else begin
      nxt_s = s_idx;
      nxt_c = c_idx + 3'd1;
    end
    link_end = ((state == M_WAIT_LEN) && (lb_rdata_i[3:0] == 4'd0)) ||
               ((state == M_DATA) && lb_rvalid_i && (recvd + 4'd1 == cnt));
    go_next  = link_end && !last_link;
  end

  always_comb begin
    srb_ready = 1'b1;
    for (int s = 0; s < N_SRB; s++)
      if (srb_done_i[s] == ev_done_o) srb_ready = 1'b0;
  end

  // Local bus requests
  always_comb begin
    lb_req_o       = '0;
    lb_req_o.board = s_idx;
    lb_req_o.chan  = c_idx;
    lb_req_o.page  = spage;
    if (state == M_REQ_LEN) begin
      lb_req_o.rd  = 1'b1;
      lb_req_o.len = 1'b1;
    end else if (state == M_DATA && issued < cnt) begin
      lb_req_o.rd   = 1'b1;
      lb_req_o.word = issued[2:0];
    end else if (go_next) begin
      lb_req_o.rd    = 1'b1;
      lb_req_o.len   = 1'b1;
      lb_req_o.board = nxt_s;
      lb_req_o.chan  = nxt_c;
    end
  end

  // Event buffer writes
  always_comb begin
    we = 1'b0;
    wa = waddr[AW-1:0];
    wd = '0;
    unique case (state)
      M_IDLE:     begin we = srb_ready && space && ttc_mode_i; wa = '0; wd = mk_evh(ev_done_o[13:0]); end
      M_HDR:      begin we = 1'b1; wa = AW'(1); wd = mk_bxh(bxmem[spage]); end
      M_WAIT_LEN: begin we = (lb_rdata_i[3:0] != 4'd0); wd = mk_lnk(link_id, lb_rdata_i[3:0]); end
      M_DATA:     begin we = lb_rvalid_i; wd = lb_rdata_i; end
      default:    ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (we) ebuf[{mpage, wa}] <= wd;
    if (state == M_DONE) lenmem[mpage] <= waddr;
    if (ev_rd_len_i) ev_rd_data_o <= word_t'(lenmem[ev_rd_page_i]);
    else             ev_rd_data_o <= ebuf[{ev_rd_page_i, ev_rd_addr_i}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= M_IDLE;
      bx        <= '0;
      l1a_cnt   <= '0;
      lb_l1a_o  <= 1'b0;
      s_idx     <= '0;
      c_idx     <= '0;
      cnt       <= '0;
      issued    <= '0;
      recvd     <= '0;
      waddr     <= '0;
      ev_done_o <= '0;
      ovf_o     <= 1'b0;
    end else begin
      // TTC counters
      if (bc0_i || bx == 12'(BX_PER_ORBIT - 1)) bx <= '0;
      else                                      bx <= bx + 12'd1;
      lb_l1a_o <= l1a_i;
      if (l1a_i) begin
        bxmem[l1a_cnt[SPW-1:0]] <= bx;
        l1a_cnt <= l1a_cnt + 16'd1;
      end
      if ((l1a_cnt - ev_done_o) > 16'(SRB_PAGES)) ovf_o <= 1'b1;

      // Crate event builder
      unique case (state)
        M_IDLE: if (srb_ready && space) begin
          if (ttc_mode_i) state <= M_HDR;
          else begin                // autonomous: no headers
            waddr <= '0;
            s_idx <= '0;
            c_idx <= '0;
            state <= M_REQ_LEN;
          end
        end
        M_HDR: begin
          waddr <= (AW+1)'(2);
          s_idx <= '0;
          c_idx <= '0;
          state <= M_REQ_LEN;
        end
        M_REQ_LEN: state <= M_WAIT_LEN;
        M_WAIT_LEN: begin
          cnt    <= lb_rdata_i[3:0];
          issued <= '0;
          recvd  <= '0;
          if (lb_rdata_i[3:0] != 4'd0) begin
            waddr <= waddr + (AW+1)'(1);
            state <= M_DATA;
          end else if (last_link) begin
            state <= M_DONE;
          end else begin
            s_idx <= nxt_s;        // count of the next link requested now
            c_idx <= nxt_c;
          end
        end
        M_DATA: begin
          if (issued < cnt) issued <= issued + 4'd1;
          if (lb_rvalid_i) begin
            waddr <= waddr + (AW+1)'(1);
            recvd <= recvd + 4'd1;
          end
          if (link_end) begin
            if (last_link) state <= M_DONE;
            else begin
              s_idx <= nxt_s;
              c_idx <= nxt_c;
              state <= M_WAIT_LEN;
            end
          end
        end
        M_DONE: begin
          ev_done_o <= ev_done_o + 16'd1;
          state     <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  a_rvalid_len : assert property (@(posedge clk) disable iff (!rst_n)
    (state == M_WAIT_LEN) |-> lb_rvalid_i);
  a_page_fits : assert property (@(posedge clk) disable iff (!rst_n)
    (state != M_IDLE) |-> (waddr < (AW+1)'(PAGE_WORDS)));

endmodule

// rack_merger: final concentration stage of the DAQ Master Readout Board.
//
// Once both crates (the DAQ MRB's own and the one reached over the LVDS bus
// between the MRBs) have finished crate event k, the merger reads the two
// crate events from their event data buffers and sends one rack event to the
// readout data pipe (RDPM):
//   event header and BX header of crate 0, the link and data words of
//   crate 0, then those of crate 1.
// The headers of crate 1 are read too and compared with those of crate 0; a
// difference sets sync_err_o. The output is a word stream with sop/eop and a
// valid/ready handshake (a word moves when valid and ready are both high).
// Reads have one clock of latency; a two-word buffer keeps one word per clock
// flowing while ready stays high. merged_o counts the rack events sent and
// frees the crate event pages.
// With ttc_mode_i low (autonomous running) the crate events carry no headers:
// the rack event is then the words of crate 0 followed by those of crate 1,
// there is nothing to compare, and an event without any packet sends no word
// (it is only counted in merged_o). ttc_mode_i must match the MRBs' setting.
// Merging the two crate events into one rack event follows the description;
// the stream interface, the header check and the buffer are this design's.
module rack_merger
  import rpc_ro_pkg::*;
#(
  parameter int unsigned MPAGES     = 8,
  parameter int unsigned PAGE_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // crate event buffers (index 0: own crate, 1: other crate)
  input  logic        ttc_mode_i,   // crate events carry two header words
  input  logic [15:0] done_i  [2],
  output logic [$clog2(MPAGES)-1:0]     rd_page_o,
  output logic [$clog2(PAGE_WORDS)-1:0] rd_addr_o,
  output logic        rd_len_o,
  input  word_t       rd_data_i [2],
  output logic [15:0] merged_o,
  // RDPM stream
  output word_t       dout_o,
  output logic        dvalid_o,
  output logic        dsop_o,
  output logic        deop_o,
  input  logic        dready_i,
  output logic        sync_err_o
);

  localparam int unsigned AW = $clog2(PAGE_WORDS);

  typedef enum logic [1:0] {R_IDLE, R_LEN, R_CAP, R_RUN} rstate_t;

  typedef struct packed {
    word_t w;
    logic  sop;
    logic  eop;
  } oword_t;

  rstate_t     state;
  logic [AW:0] len0, len1;     // crate event lengths
  logic        crate;          // crate being read
  logic [AW:0] addr;           // next address to read
  logic        issue;          // a read is issued this clock
  logic        all_issued;
  logic [AW:0] total, sent_q;  // rack event words, words issued for output
  logic [AW:0] nhdr;           // header words per crate event
  logic [AW:0] cap_total;      // rack event words, from the lengths being read
  // read issued last clock
  logic        inf_v, inf_crate, inf_out, inf_sop, inf_eop;
  logic [AW:0] inf_addr;
  word_t       hdr0 [2];
  // output buffer
  oword_t      obuf [2];
  logic        o_rd, o_wr;
  logic [1:0]  o_cnt;
  logic        push, pop;
  word_t       rdata;

  assign rd_page_o  = merged_o[$clog2(MPAGES)-1:0];
  assign rd_len_o   = (state == R_LEN);
  assign rd_addr_o  = addr[AW-1:0];
  assign nhdr      = ttc_mode_i ? (AW+1)'(2) : '0;
  assign total     = len0 + len1 - nhdr;
  assign cap_total = rd_data_i[0][AW:0] + rd_data_i[1][AW:0] - nhdr;
  assign all_issued = crate && (addr == len1);
  // issue only when the word fits the buffer (words in flight included)
  assign issue = (state == R_RUN) && !all_issued &&
                 ((2'(o_cnt) + 2'(inf_v) - 2'(pop)) < 2'd2);
  assign rdata = rd_data_i[inf_crate];
  assign push  = inf_v && inf_out;
  assign pop   = dvalid_o && dready_i;

  assign dvalid_o = (o_cnt != 0);
  assign dout_o   = obuf[o_rd].w;
  assign dsop_o   = obuf[o_rd].sop;
  assign deop_o   = obuf[o_rd].eop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= R_IDLE;
      len0       <= '0;
      len1       <= '0;
      crate      <= 1'b0;
      addr       <= '0;
      sent_q     <= '0;
      inf_v      <= 1'b0;
      inf_crate  <= 1'b0;
      inf_out    <= 1'b0;
      inf_sop    <= 1'b0;
      inf_eop    <= 1'b0;
      inf_addr   <= '0;
      o_rd       <= 1'b0;
      o_wr       <= 1'b0;
      o_cnt      <= '0;
      merged_o   <= '0;
      sync_err_o <= 1'b0;
      hdr0[0]    <= '0;
      hdr0[1]    <= '0;
    end else begin
      // Sequencer
      unique case (state)
        R_IDLE: if (done_i[0] != merged_o && done_i[1] != merged_o) state <= R_LEN;
        R_LEN: state <= R_CAP;
        R_CAP: begin               // lengths are on rd_data_i
          if (cap_total == '0) begin
            merged_o <= merged_o + 16'd1;   // empty autonomous event: nothing to send
            state    <= R_IDLE;
          end else begin
            state <= R_RUN;
          end
        end
        R_RUN: ;
        default: state <= R_IDLE;
      endcase

      if (state == R_LEN) begin
        crate  <= 1'b0;
        addr   <= '0;
        sent_q <= '0;
      end
      if (state == R_CAP) begin
        crate <= (rd_data_i[0][AW:0] == '0);   // crate 0 empty: start with crate 1
        len0 <= rd_data_i[0][AW:0];
        len1 <= rd_data_i[1][AW:0];
      end

      inf_v <= issue;
      if (issue) begin
        inf_crate <= crate;
        inf_addr  <= addr;
        inf_out   <= !(crate && addr < nhdr);
        inf_sop   <= (sent_q == '0);
        inf_eop   <= (sent_q == total - (AW+1)'(1));
        if (!(crate && addr < nhdr)) sent_q <= sent_q + (AW+1)'(1);
        if (!crate && addr == len0 - (AW+1)'(1)) begin
          crate <= 1'b1;
          addr  <= '0;
        end else begin
          addr <= addr + (AW+1)'(1);
        end
      end

      // Header check
      if (inf_v && !inf_crate && inf_addr < nhdr) hdr0[inf_addr[0]] <= rdata;
      if (inf_v && inf_crate && inf_addr < nhdr && rdata != hdr0[inf_addr[0]])
        sync_err_o <= 1'b1;

      // Output buffer
      if (push) begin
        obuf[o_wr] <= '{w: rdata, sop: inf_sop, eop: inf_eop};
        o_wr       <= ~o_wr;
      end
      if (pop) o_rd <= ~o_rd;
      o_cnt <= o_cnt + 2'(push) - 2'(pop);

      // End of the rack event: its last word leaves the buffer
      if (pop && deop_o) begin
        merged_o <= merged_o + 16'd1;
        state    <= R_IDLE;
      end
    end
  end

  a_stable : assert property (@(posedge clk) disable iff (!rst_n)
    (dvalid_o && !dready_i) |=> (dvalid_o && $stable(dout_o)));

endmodule

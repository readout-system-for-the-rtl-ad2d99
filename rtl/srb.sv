// srb: Slave Readout Board.
//
// N_CH sr_channel derandomizers work in parallel on the board's optical
// links and see the same L1Accept, so event k lies in page k mod SRB_PAGES
// of every channel. The board is a slave of the crate's local readout bus:
// when a request addresses BOARD_ID, the channel chosen by lb_req_i.chan
// answers and lb_rdata_o carries the word one clock later with lb_rvalid_o
// high; otherwise the board drives zeros, so the crate bus is the OR of all
// boards. events_done_o counts the events whose pages are complete in all
// channels, for the Master Readout Board to know what it may read.
// Eight links per board and the board structure follow the description; the
// bus signals and the completion counter are this design's.
module srb
  import rpc_ro_pkg::*;
#(
  parameter int unsigned N_CH     = 8,
  parameter int unsigned BOARD_ID = 0,
  parameter int unsigned DEPTH    = 256,
  parameter int unsigned L1_LAT   = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  packet_t     pkt_i       [N_CH],
  input  logic        pkt_valid_i [N_CH],
  input  logic        l1a_i,
  input  lb_req_t     lb_req_i,
  output word_t       lb_rdata_o,
  output logic        lb_rvalid_o,
  output logic [15:0] events_done_o,
  output logic        ovf_o
);

  word_t       ch_data [N_CH];
  logic [15:0] ch_done [N_CH];
  logic [N_CH-1:0] ch_ovf;
  logic [N_CH-1:0] ch_ahead;
  logic        sel_q;
  logic [2:0]  chan_q;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    sr_channel #(
      .DEPTH (DEPTH),
      .L1_LAT(L1_LAT),
      .PAGES (SRB_PAGES)
    ) u_ch (
      .clk          (clk),
      .rst_n        (rst_n),
      .pkt_i        (pkt_i[c]),
      .pkt_valid_i  (pkt_valid_i[c]),
      .l1a_i        (l1a_i),
      .rd_page_i    (lb_req_i.page),
      .rd_len_i     (lb_req_i.len),
      .rd_word_i    (lb_req_i.word),
      .rd_data_o    (ch_data[c]),
      .events_done_o(ch_done[c]),
      .ovf_o        (ch_ovf[c])
    );
    assign ch_ahead[c] = (ch_done[c] != events_done_o);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q         <= 1'b0;
      chan_q        <= '0;
      events_done_o <= '0;
    end else begin
      sel_q  <= lb_req_i.rd && (lb_req_i.board == 3'(BOARD_ID));
      chan_q <= lb_req_i.chan;
      if (&ch_ahead) events_done_o <= events_done_o + 16'd1;
    end
  end

  assign lb_rvalid_o = sel_q;
  assign lb_rdata_o  = sel_q ? ch_data[chan_q] : '0;
  assign ovf_o       = |ch_ovf;

endmodule

// rpc_readout_top: one module of the RPC readout with its link system.
//
// Per optical link an lmux compresses the 24 hit bits of every bunch crossing
// into packets, an optical_link carries them to the counting room, and a
// splitter (wiring here) feeds the same packets to the trigger, where an
// ldemux restores the hit vectors with a constant delay (trig_frame_o), and
// to the readout. The readout spans two trigger crates. In each crate N_SRB
// Slave Readout Boards derandomize the packets of their links on L1Accept and
// a Master Readout Board builds the crate event over the crate's local
// readout bus (the OR of the boards' answers). The DAQ MRB's rack_merger then
// joins the two crate events into one rack event for the readout data pipe
// (rdpm_*). ttc_mode_i selects between running with the TTC system (events
// carry event and BX numbers) and autonomous running (no headers); it is a
// configuration input, to be changed only while no event is pending.
//
// L1_LAT is the number of clocks from a BX's hits at hits_i to its L1Accept
// at l1a_i. The SRB channels see the packets LINK_LAT+2 clocks after the hits
// (with zero compressor delay) and the L1Accept one clock after l1a_i, because
// the MRB forwards it on the local bus; their own latency parameter is derived
// from these. The trigger output of a BX appears on trig_frame_o
// LINK_LAT+11 clocks after its hits.
// The two crates, 8 links per SRB and the split of the readout into SRBs,
// MRBs and a DAQ MRB follow the described structure; three SRBs per crate
// (48 links per RDPM) and the latencies are this design's choice.
module rpc_readout_top
  import rpc_ro_pkg::*;
#(
  parameter int unsigned N_SRB    = 3,
  parameter int unsigned N_CH     = 8,
  parameter int unsigned LINK_LAT = 18,
  parameter int unsigned L1_LAT   = 128,
  parameter int unsigned DEPTH    = 256,
  localparam int unsigned N_LINKS = 2 * N_SRB * N_CH
) (
  input  logic        clk,
  input  logic        rst_n,
  // detector side
  input  hits_t       hits_i       [N_LINKS],
  output logic        lmux_lost_o  [N_LINKS],
  // trigger side
  output hits_t       trig_frame_o [N_LINKS],
  // TTC
  input  logic        l1a_i,
  input  logic        bc0_i,
  input  logic        ttc_mode_i,     // 1: events carry event and BX numbers
  // RDPM stream
  output word_t       rdpm_data_o,
  output logic        rdpm_valid_o,
  output logic        rdpm_sop_o,
  output logic        rdpm_eop_o,
  input  logic        rdpm_ready_i,
  // status
  output logic [15:0] events_sent_o,
  output logic        srb_ovf_o,
  output logic        mrb_ovf_o,
  output logic        sync_err_o
);

  localparam int unsigned SR_LAT = L1_LAT - 1 - LINK_LAT;
  localparam int unsigned MPAGES = 8;
  localparam int unsigned PAGE_WORDS = 256;

  packet_t lm_pkt [N_LINKS];
  logic    lm_v   [N_LINKS];
  packet_t ol_pkt [N_LINKS];
  logic    ol_v   [N_LINKS];

  for (genvar l = 0; l < N_LINKS; l++) begin : g_link
    lmux u_lmux (
      .clk        (clk),
      .rst_n      (rst_n),
      .hits_i     (hits_i[l]),
      .pkt_o      (lm_pkt[l]),
      .pkt_valid_o(lm_v[l]),
      .lost_o     (lmux_lost_o[l])
    );
    optical_link #(.LATENCY(LINK_LAT)) u_link (
      .clk        (clk),
      .rst_n      (rst_n),
      .pkt_i      (lm_pkt[l]),
      .pkt_valid_i(lm_v[l]),
      .pkt_o      (ol_pkt[l]),
      .pkt_valid_o(ol_v[l])
    );
    ldemux u_ldemux (
      .clk        (clk),
      .rst_n      (rst_n),
      .pkt_i      (ol_pkt[l]),
      .pkt_valid_i(ol_v[l]),
      .frame_o    (trig_frame_o[l])
    );
  end

  // Crate event buffers, read by the merger
  logic [15:0]                   cr_done [2];
  word_t                         cr_data [2];
  logic [$clog2(MPAGES)-1:0]     mg_page;
  logic [$clog2(PAGE_WORDS)-1:0] mg_addr;
  logic                          mg_len;
  logic [15:0]                   merged;
  logic [1:0]                    cr_srb_ovf, cr_mrb_ovf;

  for (genvar c = 0; c < 2; c++) begin : g_crate
    lb_req_t     lb_req;
    logic        lb_l1a;
    word_t       b_data  [N_SRB];
    logic        b_valid [N_SRB];
    logic [15:0] b_done  [N_SRB];
    logic [N_SRB-1:0] b_ovf;
    word_t       bus_data;
    logic        bus_valid;

    always_comb begin
      bus_data  = '0;
      bus_valid = 1'b0;
      for (int b = 0; b < N_SRB; b++) begin
        bus_data  = bus_data | b_data[b];
        bus_valid = bus_valid | b_valid[b];
      end
    end

    for (genvar b = 0; b < N_SRB; b++) begin : g_srb
      localparam int unsigned L0 = (c * N_SRB + b) * N_CH;
      srb #(
        .N_CH    (N_CH),
        .BOARD_ID(b),
        .DEPTH   (DEPTH),
        .L1_LAT  (SR_LAT)
      ) u_srb (
        .clk          (clk),
        .rst_n        (rst_n),
        .pkt_i        (ol_pkt[L0 +: N_CH]),
        .pkt_valid_i  (ol_v[L0 +: N_CH]),
        .l1a_i        (lb_l1a),
        .lb_req_i     (lb_req),
        .lb_rdata_o   (b_data[b]),
        .lb_rvalid_o  (b_valid[b]),
        .events_done_o(b_done[b]),
        .ovf_o        (b_ovf[b])
      );
    end

    mrb #(
      .N_SRB     (N_SRB),
      .N_CH      (N_CH),
      .CRATE_ID  (c),
      .MPAGES    (MPAGES),
      .PAGE_WORDS(PAGE_WORDS)
    ) u_mrb (
      .clk         (clk),
      .rst_n       (rst_n),
      .l1a_i       (l1a_i),
      .bc0_i       (bc0_i),
      .ttc_mode_i  (ttc_mode_i),
      .srb_done_i  (b_done),
      .lb_req_o    (lb_req),
      .lb_rdata_i  (bus_data),
      .lb_rvalid_i (bus_valid),
      .lb_l1a_o    (lb_l1a),
      .merged_i    (merged),
      .ev_rd_page_i(mg_page),
      .ev_rd_addr_i(mg_addr),
      .ev_rd_len_i (mg_len),
      .ev_rd_data_o(cr_data[c]),
      .ev_done_o   (cr_done[c]),
      .ovf_o       (cr_mrb_ovf[c])
    );
    assign cr_srb_ovf[c] = |b_ovf;
  end

  rack_merger #(
    .MPAGES    (MPAGES),
    .PAGE_WORDS(PAGE_WORDS)
  ) u_merger (
    .clk       (clk),
    .rst_n     (rst_n),
    .ttc_mode_i(ttc_mode_i),
    .done_i    (cr_done),
    .rd_page_o (mg_page),
    .rd_addr_o (mg_addr),
    .rd_len_o  (mg_len),
    .rd_data_i (cr_data),
    .merged_o  (merged),
    .dout_o    (rdpm_data_o),
    .dvalid_o  (rdpm_valid_o),
    .dsop_o    (rdpm_sop_o),
    .deop_o    (rdpm_eop_o),
    .dready_i  (rdpm_ready_i),
    .sync_err_o(sync_err_o)
  );

  assign events_sent_o = merged;
  assign srb_ovf_o     = |cr_srb_ovf;
  assign mrb_ovf_o     = |cr_mrb_ovf;

endmodule

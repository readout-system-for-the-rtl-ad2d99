// tb_mrb: self-checking testbench of a Master Readout Board with two Slave
// Readout Boards on its local bus (crate 1, so link numbers start at 16).
//
// Sixteen links get random packet streams scheduled as an lmux sends them;
// L1Accepts go to the MRB, which forwards them to the SRBs. For every
// L1Accept the testbench records the packets of the triggered BX on every
// link and the BX counter value expected from the bc0 it sent. A reader in
// the role of the merger waits for ev_done_o, reads the length and words of
// the crate event page and compares them word by word with the expected
// event (event header, BX header, link headers, data words). For a while the
// reader stops taking events, so the MRB must wait for free pages; the number
// of clocks it waited is counted and must be above zero. For a stretch in the
// middle the MRB runs in autonomous mode, where crate events have no headers.
module tb_mrb;
  import rpc_ro_pkg::*;

  localparam int N      = 8000;
  localparam int L1_LAT = 128;
  localparam int NSRB   = 2;
  localparam int NCH    = 8;
  localparam int NL     = NSRB * NCH;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  packet_t     pkt   [NL];
  logic        pkt_v [NL];
  logic        l1a, bc0, lb_l1a, ttc;
  lb_req_t     req;
  word_t       b_data  [NSRB];
  logic        b_valid [NSRB];
  logic [15:0] b_done  [NSRB];
  logic        b_ovf   [NSRB];
  word_t       bus_data;
  logic        bus_valid;
  logic [15:0] merged, ev_done;
  logic [2:0]  rd_page;
  logic [7:0]  rd_addr;
  logic        rd_len, ovf;
  word_t       rd_data;
  int          checks = 0, failures = 0, n_events = 0, n_wait = 0, n_empty = 0, n_auto = 0;

  for (genvar s = 0; s < NSRB; s++) begin : g_srb
    srb #(.BOARD_ID(s), .L1_LAT(L1_LAT)) u_srb (
      .clk(clk), .rst_n(rst_n), .pkt_i(pkt[s*NCH +: NCH]), .pkt_valid_i(pkt_v[s*NCH +: NCH]),
      .l1a_i(lb_l1a), .lb_req_i(req), .lb_rdata_o(b_data[s]), .lb_rvalid_o(b_valid[s]),
      .events_done_o(b_done[s]), .ovf_o(b_ovf[s]));
  end
  assign bus_data  = b_data[0] | b_data[1];
  assign bus_valid = b_valid[0] | b_valid[1];

  mrb #(.N_SRB(NSRB), .CRATE_ID(1)) dut (
    .clk(clk), .rst_n(rst_n), .l1a_i(l1a), .bc0_i(bc0), .ttc_mode_i(ttc), .srb_done_i(b_done),
    .lb_req_o(req), .lb_rdata_i(bus_data), .lb_rvalid_i(bus_valid), .lb_l1a_o(lb_l1a),
    .merged_i(merged), .ev_rd_page_i(rd_page), .ev_rd_addr_i(rd_addr), .ev_rd_len_i(rd_len),
    .ev_rd_data_o(rd_data), .ev_done_o(ev_done), .ovf_o(ovf));

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (16'(ev_done - merged) == 16'd8 && b_done[0] != ev_done && b_done[1] != ev_done) n_wait++;

  // autonomous mode (no headers) for L1Accepts in clocks 4500..5499; the mode
  // input changes in the middle of gaps without L1Accepts
  function automatic logic ttc_at(input int t);
    return !(t >= 4500 && t < 5500);
  endfunction
  function automatic logic in_gap(input int t);
    return (t >= 3900 && t < 4500) || (t >= 5500 && t < 6000);
  endfunction

  packet_t sched [NL][N + 32];
  logic    sv    [NL][N + 32];
  packet_t bxp   [NL][N][$];
  logic    trig  [N + L1_LAT + 32];
  word_t   expev [$][$];

  initial begin
    for (int c = 0; c < NL; c++)
      for (int t = 0; t < N + 32; t++) begin sv[c][t] = 1'b0; sched[c][t] = '0; end
    for (int t = 0; t < N + L1_LAT + 32; t++) trig[t] = 1'b0;
    for (int c = 0; c < NL; c++)
      for (int b = 0; b < N; b++)
        for (int p = 0; p < N_PART; p++)
          if (($urandom % 1000) < ((c % 5 == 0) ? 2 : 25)) begin
            int t;
            packet_t q;
            t = b;
            while (sv[c][t]) t++;
            if (t - b <= int'(MAX_DELAY)) begin
              q.data = 4'($urandom_range(1, 15)); q.pnum = 3'(p);
              q.delay = 3'(t - b); q.eod = 1'b0;
              sv[c][t] = 1'b1; sched[c][t] = q;
              bxp[c][b].push_back(q);
            end
          end
    for (int b = 150; b < N - 20; b++)
      if ($urandom % 20 == 0 && !in_gap(b + L1_LAT - 1)) begin
        word_t ev [$];
        int t;
        t = b + L1_LAT - 1;              // L1Accept at the MRB, one clock before the SRBs
        trig[t] = 1'b1;
        ev.delete();
        if (ttc_at(t)) begin
          ev.push_back(mk_evh(14'(expev.size())));
          ev.push_back(mk_bxh(12'((t - 11) % BX_PER_ORBIT)));
        end else n_auto++;
        for (int c = 0; c < NL; c++)
          if (bxp[c][b].size() != 0) begin
            ev.push_back(mk_lnk(6'(16 + c), 4'(bxp[c][b].size())));
            foreach (bxp[c][b][i]) ev.push_back(mk_dat(bxp[c][b][i]));
          end
        if (ev.size() == (ttc_at(t) ? 2 : 0)) n_empty++;
        expev.push_back(ev);
        b += 60;
      end
  end

  initial begin
    l1a = 1'b0; bc0 = 1'b0; ttc = 1'b1;
    for (int c = 0; c < NL; c++) begin pkt[c] = '0; pkt_v[c] = 1'b0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N + L1_LAT + 32; t++) begin
      for (int c = 0; c < NL; c++) begin
        pkt[c]   = (t < N + 32) ? sched[c][t] : '0;
        pkt_v[c] = (t < N + 32) ? sv[c][t] : 1'b0;
      end
      l1a = trig[t];
      bc0 = (t % BX_PER_ORBIT == 10);
      ttc = !(t >= 4200 && t < 5750);
      @(negedge clk);
    end
    for (int c = 0; c < NL; c++) pkt_v[c] = 1'b0;
    l1a = 1'b0; bc0 = 1'b0;
  end

  // Reader in the role of the merger
  initial begin
    int k;
    k = 0;
    merged = '0; rd_page = '0; rd_addr = '0; rd_len = 1'b0;
    forever begin
      @(negedge clk);
      // stall between clock 2000 and 3500 so that the MRB runs out of pages
      if (ev_done != 16'(k) && !(cyc > 2000 && cyc < 3500)) begin
        int len;
        rd_page = 3'(k % 8); rd_len = 1'b1;
        @(negedge clk);
        len = int'(rd_data);
        rd_len = 1'b0;
        checks++;
        if (len != expev[k].size()) begin
          failures++; $display("FAIL event %0d: length %0d exp %0d", k, len, expev[k].size());
        end
        for (int i = 0; i < len && i < expev[k].size(); i++) begin
          rd_addr = 8'(i);
          @(negedge clk);
          checks++;
          if (rd_data !== expev[k][i]) begin
            failures++;
            if (failures < 20) $display("FAIL event %0d word %0d: %h exp %h", k, i, rd_data, expev[k][i]);
          end
        end
        k++;
        n_events = k;
        merged = 16'(k);
      end
    end
  end

  initial begin
    repeat (N + L1_LAT + 1500) @(posedge clk);
    checks++;
    if (n_events != expev.size() || n_events < 50 || n_wait == 0 || n_empty == 0 || n_auto == 0 || ovf) begin
      failures++;
      $display("FAIL: %0d of %0d events, waited %0d, empty %0d, ovf %0b", n_events, expev.size(), n_wait, n_empty, ovf);
    end
    $display("events=%0d waited=%0d empty=%0d autonomous=%0d", n_events, n_wait, n_empty, n_auto);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + L1_LAT + 3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

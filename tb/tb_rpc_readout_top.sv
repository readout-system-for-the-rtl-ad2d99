// tb_rpc_readout_top: end-to-end testbench of the readout module at its
// default size (48 links, two crates of three SRBs).
//
// Random hits at a low occupancy drive all links; for 100 clocks four links
// get far more hits than they can send, so their compressors drop data. The
// testbench keeps the hit history and checks:
//  * trigger path: every link's trig_frame_o equals the hits LINK_LAT+11
//    clocks earlier (links and BXs hit by the overload excepted);
//  * readout path: for each L1Accept (sent L1_LAT clocks after the chosen BX)
//    the rack event on the RDPM stream must be the event header, the BX
//    header (BX counter at the L1Accept, orbit marker every 3564 clocks),
//    and for every link with hits, in link order, a link header and one data
//    word per non-empty partition, in partition order, end-of-data on the
//    last. The delay field of the packets is not compared.
// It counts the mechanisms the design has and fails if one never occurred:
// delayed packets, compressor losses, L1Accepts queued in the SRBs (bursts),
// MRB waiting for free pages (long RDPM stall), merger stalls, empty events,
// orbit resets, and a stretch in autonomous mode (events without headers).
// Overflow and synchronisation errors must stay low.
module tb_rpc_readout_top;
  import rpc_ro_pkg::*;

  localparam int NL       = 48;
  localparam int LINK_LAT = 18;
  localparam int L1_LAT   = 128;
  localparam int TRIG_LAT = LINK_LAT + 11;
  localparam int N        = 16000;   // clocks with hits
  localparam int DENSE0   = 6000;
  localparam int DENSE1   = 6100;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  hits_t       hits  [NL];
  logic        lost  [NL];
  hits_t       tframe [NL];
  logic        l1a, bc0, ttc;
  word_t       rdata;
  logic        rvalid, rsop, reop, rready;
  logic [15:0] sent;
  logic        srb_ovf, mrb_ovf, sync_err;

  rpc_readout_top dut (
    .clk(clk), .rst_n(rst_n), .hits_i(hits), .lmux_lost_o(lost), .trig_frame_o(tframe),
    .l1a_i(l1a), .bc0_i(bc0), .ttc_mode_i(ttc), .rdpm_data_o(rdata), .rdpm_valid_o(rvalid), .rdpm_sop_o(rsop),
    .rdpm_eop_o(reop), .rdpm_ready_i(rready), .events_sent_o(sent), .srb_ovf_o(srb_ovf),
    .mrb_ovf_o(mrb_ovf), .sync_err_o(sync_err));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int n_delayed = 0, n_lost = 0, n_burst = 0, n_mrb_wait = 0, n_rdpm_stall = 0;
  int n_empty = 0, n_bc0 = 0, n_events = 0, n_trig_nonzero = 0, n_auto = 0;

  // Autonomous mode (no headers) for L1Accepts in clocks 12500..13499; the
  // mode input changes in the middle of the gaps without L1Accepts around it.
  function automatic logic ttc_at(input int t);
    return !(t >= 12500 && t < 13500);
  endfunction
  function automatic logic in_gap(input int t);
    return (t >= 12000 && t < 12500) || (t >= 13500 && t < 14000);
  endfunction

  hits_t hist [NL][N + 64];
  logic  l1a_at [N + L1_LAT + 64];
  word_t expev [$][$];

  function automatic logic dense_link(input int l);
    return l < 4;
  endfunction

  function automatic hits_t rnd_hits(input int l, input int t);
    hits_t h;
    int occ;   // per mille per partition
    h = '0;
    occ = (dense_link(l) && t >= DENSE0 && t < DENSE1) ? 700 : 12;
    for (int p = 0; p < N_PART; p++)
      if (($urandom % 1000) < occ) h[p*PART_BITS +: PART_BITS] = PART_BITS'($urandom_range(1, 15));
    return h;
  endfunction

  // expected rack event of an L1Accept at clock t
  task automatic make_event(input int t);
    word_t ev [$];
    int b;
    b = t - L1_LAT;
    if (ttc_at(t)) begin
      ev.push_back(mk_evh(14'(expev.size())));
      ev.push_back(mk_bxh(12'((t - 6) % BX_PER_ORBIT)));
    end else n_auto++;
    for (int l = 0; l < NL; l++) begin
      int n;
      n = 0;
      for (int p = 0; p < N_PART; p++) if (hist[l][b][p*PART_BITS +: PART_BITS] != 0) n++;
      if (n != 0) begin
        int k;
        k = 0;
        ev.push_back(mk_lnk(6'(l), 4'(n)));
        for (int p = 0; p < N_PART; p++)
          if (hist[l][b][p*PART_BITS +: PART_BITS] != 0) begin
            packet_t q;
            k++;
            q.data = hist[l][b][p*PART_BITS +: PART_BITS];
            q.pnum = 3'(p); q.delay = '0; q.eod = (k == n);
            ev.push_back(mk_dat(q));
          end
      end
    end
    if (ev.size() == (ttc_at(t) ? 2 : 0)) n_empty++;
    expev.push_back(ev);
  endtask

  initial begin
    for (int l = 0; l < NL; l++)
      for (int t = 0; t < N + 64; t++) hist[l][t] = (t < N) ? rnd_hits(l, t) : '0;
    for (int t = 0; t < N + L1_LAT + 64; t++) l1a_at[t] = 1'b0;
    for (int b = 300; b < N - 20; b++) begin
      if (b >= DENSE0 - 20 && b < DENSE1 + 20) continue;
      if (in_gap(b + L1_LAT) || in_gap(b + 4 + L1_LAT)) continue;
      if (b % 2500 == 7) begin         // burst of three L1Accepts
        for (int j = 0; j < 3; j++) l1a_at[b + j * 2 + L1_LAT] = 1'b1;
        b += 100;
      end else if ($urandom % 150 == 0) begin
        l1a_at[b + L1_LAT] = 1'b1;
        b += 3;
      end
    end
  end

  // Stimulus
  initial begin
    l1a = 1'b0; bc0 = 1'b0; ttc = 1'b1;
    for (int l = 0; l < NL; l++) hits[l] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N + L1_LAT + 64; t++) begin
      for (int l = 0; l < NL; l++) hits[l] = (t < N + 64) ? hist[l][t] : '0;
      l1a = l1a_at[t];
      bc0 = (t % BX_PER_ORBIT == 5);
      ttc = !(t >= 12250 && t < 13750);
      if (bc0) n_bc0++;
      if (l1a) begin
        make_event(t);
        if (l1a_at[t - 2]) n_burst++;
      end
      @(negedge clk);
      cyc = t + 1;
    end
    l1a = 1'b0; bc0 = 1'b0;
    for (int l = 0; l < NL; l++) hits[l] = '0;
  end

  // RDPM ready: random, with one long stall
  always @(negedge clk) rready <= (cyc >= 9000 && cyc < 11500) ? 1'b0 : ($urandom % 4 != 0);

  // Trigger path check, in the middle of each clock
  always @(negedge clk) begin
    if (rst_n && cyc >= TRIG_LAT && cyc - TRIG_LAT < N) begin
      int b;
      b = cyc - TRIG_LAT;
      for (int l = 0; l < NL; l++) begin
        if (dense_link(l) && b >= DENSE0 - 10 && b < DENSE1 + 20) continue;
        checks++;
        if (tframe[l] !== hist[l][b]) begin
          failures++;
          if (failures < 10) $display("FAIL trigger link %0d bx %0d: %h exp %h", l, b, tframe[l], hist[l][b]);
        end
        if (tframe[l] != 0) n_trig_nonzero++;
      end
    end
  end

  // Mechanism counters
  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < NL; l++) if (lost[l]) n_lost++;
    if (rvalid && !rready) n_rdpm_stall++;
    if (dut.g_crate[0].u_mrb.srb_ready && !dut.g_crate[0].u_mrb.space) n_mrb_wait++;
  end

  // Readout path check
  initial begin
    int k, i;
    k = 0; i = 0;
    forever begin
      @(posedge clk);
      if (rvalid && rready) begin
        word_t e, g;
        while (k < expev.size() && expev[k].size() == 0) begin   // empty autonomous event
          k++; n_events = k;
        end
        if (k >= expev.size()) begin
          failures++; $display("FAIL: unexpected rack event %0d", k);
          k++;
        end else begin
          e = expev[k][i];
          g = rdata;
          if (g[15:14] == TAG_DAT && g[3:1] != 0) n_delayed++;
          if (e[15:14] == TAG_DAT) g[3:1] = '0;   // delay not compared
          checks++;
          if (g !== e || rsop !== (i == 0) || reop !== (i == expev[k].size() - 1)) begin
            failures++;
            if (failures < 20) $display("FAIL event %0d word %0d: %h (sop %0b eop %0b) exp %h",
                                        k, i, rdata, rsop, reop, e);
          end
          if (reop || i == expev[k].size() - 1) begin
            k++; i = 0; n_events = k;
          end else i++;
        end
      end
    end
  end

  initial begin
    repeat (N + L1_LAT + 6000) @(posedge clk);
    while (n_events < expev.size() && expev[n_events].size() == 0) n_events++;
    checks++;
    if (n_events != expev.size() || n_events < 50) begin
      failures++; $display("FAIL: %0d of %0d rack events", n_events, expev.size());
    end
    checks++;
    if (srb_ovf || mrb_ovf || sync_err) begin
      failures++; $display("FAIL: ovf srb %0b mrb %0b sync %0b", srb_ovf, mrb_ovf, sync_err);
    end
    $display("events=%0d delayed=%0d lost=%0d burst=%0d mrb_wait=%0d rdpm_stall=%0d empty=%0d bc0=%0d auto=%0d trig_nonzero=%0d",
             n_events, n_delayed, n_lost, n_burst, n_mrb_wait, n_rdpm_stall, n_empty, n_bc0, n_auto, n_trig_nonzero);
    checks++;
    if (n_delayed == 0) begin failures++; $display("FAIL: no delayed packet"); end
    checks++;
    if (n_lost == 0) begin failures++; $display("FAIL: no compressor loss"); end
    checks++;
    if (n_burst == 0) begin failures++; $display("FAIL: no L1Accept burst"); end
    checks++;
    if (n_mrb_wait == 0) begin failures++; $display("FAIL: MRB never waited for pages"); end
    checks++;
    if (n_rdpm_stall == 0) begin failures++; $display("FAIL: no RDPM stall"); end
    checks++;
    if (n_empty == 0) begin failures++; $display("FAIL: no empty event"); end
    checks++;
    if (n_auto == 0) begin failures++; $display("FAIL: no event in autonomous mode"); end
    checks++;
    if (n_bc0 < 2) begin failures++; $display("FAIL: no orbit marker"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + L1_LAT + 9000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

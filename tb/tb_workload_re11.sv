// tb_workload_re11: the readout module at its default size under the load
// expected for the worst RPC chambers (RE1/1).
//
// Two runs of 100 events each, with the link occupancy of the rate study:
// 0.04 packets per link and event without noise and 0.065 with 100 Hz/cm^2
// noise (hits drawn independently per partition). L1Accepts come at random
// intervals averaging 400 clocks, the 100 kHz CMS L1Accept rate, and the RDPM
// is always ready. For every rack event the testbench checks the word count
// (2 headers + one header per non-empty link + one word per packet) and the
// packet count against the hits of the triggered BX, and checks that the
// event has left the module before the next L1Accept is due on average
// (400 clocks after its L1Accept). It reports the measured packets per link
// and event, which must lie within 25 % of the target occupancy.
module tb_workload_re11;
  import rpc_ro_pkg::*;

  localparam int NL     = 48;
  localparam int L1_LAT = 128;
  localparam int NEV    = 100;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  hits_t       hits  [NL];
  logic        lost  [NL];
  hits_t       tframe [NL];
  logic        l1a, bc0;
  word_t       rdata;
  logic        rvalid, rsop, reop;
  logic [15:0] sent;
  logic        srb_ovf, mrb_ovf, sync_err;

  rpc_readout_top dut (
    .clk(clk), .rst_n(rst_n), .hits_i(hits), .lmux_lost_o(lost), .trig_frame_o(tframe),
    .l1a_i(l1a), .bc0_i(bc0), .ttc_mode_i(1'b1), .rdpm_data_o(rdata), .rdpm_valid_o(rvalid), .rdpm_sop_o(rsop),
    .rdpm_eop_o(reop), .rdpm_ready_i(1'b1), .events_sent_o(sent), .srb_ovf_o(srb_ovf),
    .mrb_ovf_o(mrb_ovf), .sync_err_o(sync_err));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int pk_ring [512];     // packets per BX over all links
  int ln_ring [512];     // non-empty links per BX
  int exp_pk [$], exp_ln [$], t_l1a [$];
  int occ_pm;            // per 100000 per partition
  int max_latency = 0, max_pk = 0, n_lost = 0;

  always @(posedge clk) if (rst_n) for (int l = 0; l < NL; l++) if (lost[l]) n_lost++;

  // Checker of rack events
  int k = 0, words = 0, dats = 0, pk_sum = 0;
  always @(posedge clk) if (rst_n && rvalid) begin
    words++;
    if (rdata[15:14] == TAG_DAT) dats++;
    if (reop) begin
      checks++;
      if (k >= exp_pk.size()) begin
        failures++; $display("FAIL: unexpected event %0d", k);
      end else begin
        if (words != 2 + exp_ln[k] + exp_pk[k] || dats != exp_pk[k]) begin
          failures++;
          $display("FAIL event %0d: %0d words %0d packets, exp %0d words %0d packets",
                   k, words, dats, 2 + exp_ln[k] + exp_pk[k], exp_pk[k]);
        end
        checks++;
        if (cyc - t_l1a[k] > max_latency) max_latency = cyc - t_l1a[k];
        if (cyc - t_l1a[k] >= 400) begin
          failures++; $display("FAIL event %0d: left %0d clocks after its L1Accept", k, cyc - t_l1a[k]);
        end
        pk_sum += dats;
        if (dats > max_pk) max_pk = dats;
      end
      k++; words = 0; dats = 0;
    end
  end

  task automatic run(input int occ, input int target_x1000);
    int next_l1a, k0, ntrig;
    k0 = k; pk_sum = 0; max_pk = 0; max_latency = 0; ntrig = 0;
    occ_pm = occ;
    next_l1a = cyc + L1_LAT + 10 + $urandom_range(3, 797);
    while (ntrig < NEV) begin
      int npk, nln;
      npk = 0; nln = 0;
      for (int l = 0; l < NL; l++) begin
        hits_t h;
        int n;
        h = '0; n = 0;
        for (int p = 0; p < N_PART; p++)
          if (($urandom % 100000) < occ_pm) begin
            h[p*PART_BITS +: PART_BITS] = PART_BITS'($urandom_range(1, 15)); n++;
          end
        hits[l] = h;
        npk += n;
        if (n != 0) nln++;
      end
      pk_ring[cyc % 512] = npk;
      ln_ring[cyc % 512] = nln;
      l1a = (cyc == next_l1a);
      bc0 = (cyc % BX_PER_ORBIT == 5);
      if (l1a) begin
        exp_pk.push_back(pk_ring[(cyc - L1_LAT) % 512]);
        exp_ln.push_back(ln_ring[(cyc - L1_LAT) % 512]);
        t_l1a.push_back(cyc);
        ntrig++;
        next_l1a = cyc + $urandom_range(3, 797);
      end
      @(negedge clk);
      cyc++;
    end
    l1a = 1'b0;
    for (int i = 0; i < 600; i++) begin
      for (int l = 0; l < NL; l++) hits[l] = '0;
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (k - k0 != NEV) begin failures++; $display("FAIL: %0d of %0d events", k - k0, NEV); end
    // packets per link and event, x1000
    $display("occupancy target %0d/1000 packets per link: measured %0d/1000, max %0d packets per event, max latency %0d clocks",
             target_x1000, pk_sum * 1000 / (NEV * NL), max_pk, max_latency);
    checks++;
    if (pk_sum * 1000 / (NEV * NL) * 4 < target_x1000 * 3 ||
        pk_sum * 1000 / (NEV * NL) * 4 > target_x1000 * 5) begin
      failures++; $display("FAIL: measured occupancy off target");
    end
  endtask

  initial begin
    l1a = 1'b0; bc0 = 1'b0;
    for (int l = 0; l < NL; l++) hits[l] = '0;
    for (int i = 0; i < 512; i++) begin pk_ring[i] = 0; ln_ring[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(667, 40);     // no noise: 0.04 packets per link and event
    run(1083, 65);    // 100 Hz/cm^2 noise: 0.065
    checks++;
    if (srb_ovf || mrb_ovf || sync_err || n_lost != 0) begin
      failures++; $display("FAIL: ovf %0b %0b sync %0b lost %0d", srb_ovf, mrb_ovf, sync_err, n_lost);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NEV * 800 + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

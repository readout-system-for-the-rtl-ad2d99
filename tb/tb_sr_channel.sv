// tb_sr_channel: self-checking testbench of one SRB derandomizer channel.
//
// The testbench schedules the partitions of random bunch crossings on the
// link (first free clock, at most 7 clocks of delay, in BX order) and sends
// L1Accepts L1_LAT clocks after chosen BXs, singly and in bursts of
// consecutive clocks that fill the L1Accept queue. For every L1Accept it
// records the packets of the triggered BX. A reader process waits until the
// channel reports event k done, reads the packet count and the packets of
// page k mod 16 through the read port and compares them with the record.
// Empty events, full (6-packet) events and bursts are counted and must occur.
module tb_sr_channel;
  import rpc_ro_pkg::*;

  localparam int N      = 6000;
  localparam int L1_LAT = 128;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  packet_t     pkt;
  logic        pkt_v, l1a;
  logic [3:0]  rd_page;
  logic        rd_len;
  logic [2:0]  rd_word;
  word_t       rd_data;
  logic [15:0] done;
  logic        ovf;
  int          checks = 0, failures = 0;
  int          n_empty = 0, n_full = 0, n_burst = 0, n_events = 0;

  sr_channel #(.DEPTH(256), .L1_LAT(L1_LAT)) dut (
    .clk(clk), .rst_n(rst_n), .pkt_i(pkt), .pkt_valid_i(pkt_v), .l1a_i(l1a),
    .rd_page_i(rd_page), .rd_len_i(rd_len), .rd_word_i(rd_word), .rd_data_o(rd_data),
    .events_done_o(done), .ovf_o(ovf));

  always #5 clk = ~clk;

  packet_t sched [N + 32];
  logic    sv    [N + 32];
  packet_t bxp   [N][$];     // packets of each BX, in link order
  logic    trig  [N + L1_LAT + 32];
  packet_t expq  [$][$];

  initial begin
    for (int t = 0; t < N + 32; t++) begin sv[t] = 1'b0; sched[t] = '0; end
    for (int t = 0; t < N + L1_LAT + 32; t++) trig[t] = 1'b0;
    for (int b = 0; b < N; b++) begin
      int occ;
      occ = (b % 200 == 0) ? 100 : 15;   // some BXs with all partitions hit
      for (int p = 0; p < N_PART; p++) begin
        if (($urandom % 100) < occ) begin
          int t;
          t = b;
          while (sv[t]) t++;
          if (t - b <= int'(MAX_DELAY)) begin
            packet_t q;
            q.data = 4'($urandom_range(1, 15)); q.pnum = 3'(p);
            q.delay = 3'(t - b); q.eod = 1'b0;
            sv[t] = 1'b1; sched[t] = q;
            bxp[b].push_back(q);
          end
        end
      end
    end
    // L1Accepts: random single ones, and bursts of 4 consecutive BXs
    for (int b = 200; b < N - 20; b++) begin
      if (b % 200 == 0) begin
        trig[b + L1_LAT] = 1'b1;
        b += 10;
      end else if (b % 600 == 105) begin
        for (int j = 0; j < 4; j++) trig[b + j + L1_LAT] = 1'b1;
        b += 40;
      end else if ($urandom % 40 == 0) begin
        trig[b + L1_LAT] = 1'b1;
        b += 10;
      end
    end
  end

  // Driver
  initial begin
    pkt = '0; pkt_v = 1'b0; l1a = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N + L1_LAT + 32; t++) begin
      pkt   = (t < N + 32) ? sched[t] : '0;
      pkt_v = (t < N + 32) ? sv[t] : 1'b0;
      l1a   = trig[t];
      if (trig[t]) begin
        expq.push_back(bxp[t - L1_LAT]);
        if (trig[t - 1]) n_burst++;
      end
      @(negedge clk);
    end
    pkt_v = 1'b0; l1a = 1'b0;
  end

  // Reader
  initial begin
    int k = 0;
    rd_page = '0; rd_len = 1'b0; rd_word = '0;
    forever begin
      @(negedge clk);
      if (done != 16'(k)) begin
        packet_t e [$];
        int cnt;
        e = expq[k];
        rd_page = 4'(k % 16); rd_len = 1'b1;
        @(negedge clk);
        cnt = int'(rd_data);
        checks++;
        if (cnt != e.size()) begin
          failures++;
          $display("FAIL event %0d: count %0d exp %0d", k, cnt, e.size());
        end
        if (cnt == 0) n_empty++;
        if (cnt == 6) n_full++;
        rd_len = 1'b0;
        for (int i = 0; i < e.size(); i++) begin
          rd_word = 3'(i);
          @(negedge clk);
          checks++;
          if (rd_data !== mk_dat(e[i])) begin
            failures++;
            $display("FAIL event %0d word %0d: %h exp %h", k, i, rd_data, mk_dat(e[i]));
          end
        end
        k++;
        n_events = k;
      end
    end
  end

  initial begin
    repeat (N + L1_LAT + 400) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + L1_LAT + 200) @(posedge clk);
    checks++;
    if (n_events != expq.size() || n_events < 50) begin
      failures++; $display("FAIL: %0d events read of %0d", n_events, expq.size());
    end
    checks++;
    if (n_empty == 0 || n_full == 0 || n_burst == 0 || ovf) begin
      failures++; $display("FAIL: coverage empty=%0d full=%0d burst=%0d ovf=%0b", n_empty, n_full, n_burst, ovf);
    end
    $display("events=%0d empty=%0d full=%0d burst=%0d", n_events, n_empty, n_full, n_burst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

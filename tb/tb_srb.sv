// tb_srb: self-checking testbench of a Slave Readout Board.
//
// Eight links get independent random packet streams, scheduled as an lmux
// would send them (first free clock, delay at most 7, BX order). L1Accepts
// come L1_LAT clocks after chosen BXs. A reader acting as the Master Readout
// Board waits for events_done_o, then reads every channel's count and packets
// over the local bus (board 2) and compares them with the record. It also
// issues reads for board 5 in between, which this board must not answer, and
// checks the one-clock read latency of the bus.
module tb_srb;
  import rpc_ro_pkg::*;

  localparam int N      = 4000;
  localparam int L1_LAT = 128;
  localparam int NCH    = 8;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  packet_t     pkt   [NCH];
  logic        pkt_v [NCH];
  logic        l1a;
  lb_req_t     req;
  word_t       rdata;
  logic        rvalid;
  logic [15:0] done;
  logic        ovf;
  int          checks = 0, failures = 0, n_events = 0, n_words = 0;

  srb #(.BOARD_ID(2)) dut (
    .clk(clk), .rst_n(rst_n), .pkt_i(pkt), .pkt_valid_i(pkt_v), .l1a_i(l1a),
    .lb_req_i(req), .lb_rdata_o(rdata), .lb_rvalid_o(rvalid),
    .events_done_o(done), .ovf_o(ovf));

  always #5 clk = ~clk;

  packet_t sched [NCH][N + 32];
  logic    sv    [NCH][N + 32];
  packet_t bxp   [NCH][N][$];
  logic    trig  [N + L1_LAT + 32];
  int      trig_bx [$];

  initial begin
    for (int c = 0; c < NCH; c++)
      for (int t = 0; t < N + 32; t++) begin sv[c][t] = 1'b0; sched[c][t] = '0; end
    for (int t = 0; t < N + L1_LAT + 32; t++) trig[t] = 1'b0;
    for (int c = 0; c < NCH; c++)
      for (int b = 0; b < N; b++)
        for (int p = 0; p < N_PART; p++)
          if (($urandom % 100) < 12) begin
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
      if ($urandom % 30 == 0) begin
        trig[b + L1_LAT] = 1'b1;
        trig_bx.push_back(b);
        b += 40;
      end
  end

  initial begin
    l1a = 1'b0;
    for (int c = 0; c < NCH; c++) begin pkt[c] = '0; pkt_v[c] = 1'b0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N + L1_LAT + 32; t++) begin
      for (int c = 0; c < NCH; c++) begin
        pkt[c]   = (t < N + 32) ? sched[c][t] : '0;
        pkt_v[c] = (t < N + 32) ? sv[c][t] : 1'b0;
      end
      l1a = trig[t];
      @(negedge clk);
    end
    for (int c = 0; c < NCH; c++) pkt_v[c] = 1'b0;
    l1a = 1'b0;
  end

  // Reader: one request per clock, answers checked one clock later
  initial begin
    int k;
    k = 0;
    req = '0;
    forever begin
      @(negedge clk);
      req = '0;
      if (done != 16'(k)) begin
        int b;
        b = trig_bx[k];
        for (int c = 0; c < NCH; c++) begin
          // count
          req = '0; req.rd = 1'b1; req.board = 3'd2; req.chan = 3'(c);
          req.page = 4'(k % 16); req.len = 1'b1;
          @(negedge clk);
          // a request for another board in the same clock as the answer
          req = '0; req.rd = 1'b1; req.board = 3'd5; req.len = 1'b1;
          checks++;
          if (!rvalid || int'(rdata) != bxp[c][b].size()) begin
            failures++;
            $display("FAIL ev %0d ch %0d: count %0d v=%0b exp %0d", k, c, rdata, rvalid, bxp[c][b].size());
          end
          for (int i = 0; i < bxp[c][b].size(); i++) begin
            @(negedge clk);
            checks++;
            if (rvalid || rdata != '0) begin
              failures++; $display("FAIL: answer to another board's request");
            end
            req = '0; req.rd = 1'b1; req.board = 3'd2; req.chan = 3'(c);
            req.page = 4'(k % 16); req.word = 3'(i);
            @(negedge clk);
            req = '0;
            checks++;
            n_words++;
            if (!rvalid || rdata !== mk_dat(bxp[c][b][i])) begin
              failures++;
              $display("FAIL ev %0d ch %0d word %0d: %h exp %h", k, c, i, rdata, mk_dat(bxp[c][b][i]));
            end
          end
          @(negedge clk);
          req = '0;
        end
        k++;
        n_events = k;
      end
    end
  end

  initial begin
    repeat (N + L1_LAT + 1500) @(posedge clk);
    checks++;
    if (n_events != trig_bx.size() || n_events < 20 || n_words < 100 || ovf) begin
      failures++; $display("FAIL: %0d of %0d events, %0d words", n_events, trig_bx.size(), n_words);
    end
    $display("events=%0d words=%0d", n_events, n_words);
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

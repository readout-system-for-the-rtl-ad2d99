// tb_lmux: self-checking testbench of the lmux compressor.
//
// Random hit vectors (with quiet and busy phases) drive the compressor. A
// reference model in the testbench, written as a plain queue of BXs, predicts
// every packet (partition bits, number, delay, end-of-data) and every lost BX
// clock by clock; the outputs are compared every clock. A directed check
// confirms the latency: a lone BX's first packet appears 2 clocks after its
// hits with delay 0.
module tb_lmux;
  import rpc_ro_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  hits_t   hits;
  packet_t pkt;
  logic    pkt_v, lost;
  int      checks = 0, failures = 0;
  int      n_lost = 0, n_delayed = 0, n_pkts = 0;

  lmux dut (.clk(clk), .rst_n(rst_n), .hits_i(hits), .pkt_o(pkt),
            .pkt_valid_o(pkt_v), .lost_o(lost));

  always #5 clk = ~clk;

  // Reference model
  hits_t q_h [$];
  int    q_t [$];
  int    cyc = 0;
  logic  exp_v, exp_lost;
  packet_t exp_p;

  task automatic ref_step(input hits_t h);
    // decisions of this clock, from the queue state before the edge
    logic sent = 1'b0, lst = 1'b0;
    packet_t p = '0;
    if (q_h.size() != 0) begin
      int age = cyc - q_t[0] - 1;
      if (age > int'(MAX_DELAY)) begin
        void'(q_h.pop_front()); void'(q_t.pop_front());
        lst = 1'b1;
      end else begin
        int k = 0;
        hits_t hd = q_h[0];
        while (hd[k*PART_BITS +: PART_BITS] == 0) k++;
        p.data  = hd[k*PART_BITS +: PART_BITS];
        p.pnum  = PNUM_BITS'(k);
        p.delay = DELAY_BITS'(age);
        hd[k*PART_BITS +: PART_BITS] = '0;
        q_h[0]  = hd;
        p.eod   = (hd == 0);
        sent    = 1'b1;
        if (p.eod) begin void'(q_h.pop_front()); void'(q_t.pop_front()); end
      end
    end
    if (h != 0) begin
      if (q_h.size() < 8) begin q_h.push_back(h); q_t.push_back(cyc); end
      else lst = 1'b1;
    end
    exp_v = sent; exp_p = p; exp_lost = lst;
    cyc++;
  endtask

  function automatic hits_t rnd_hits(input int busy);
    hits_t h = '0;
    for (int p = 0; p < N_PART; p++)
      if (($urandom % 100) < busy) h[p*PART_BITS +: PART_BITS] = PART_BITS'($urandom_range(1, 15));
    return h;
  endfunction

  initial begin
    hits = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Directed latency check: a lone BX, two partitions
    @(negedge clk) hits = 24'h000_0A1;   // partitions 0 and 1... bits [3:0]=1, [7:4]=A
    @(negedge clk) hits = '0;             // edge 1 sampled the hits
    @(negedge clk);                       // first packet out after the second edge
    checks++;
    if (!(pkt_v && pkt.pnum == 0 && pkt.data == 4'h1 && pkt.delay == 0 && !pkt.eod)) begin
      failures++; $display("FAIL latency: first packet v=%0b %p", pkt_v, pkt);
    end
    @(negedge clk);
    checks++;
    if (!(pkt_v && pkt.pnum == 1 && pkt.data == 4'hA && pkt.delay == 1 && pkt.eod)) begin
      failures++; $display("FAIL latency: second packet v=%0b %p", pkt_v, pkt);
    end
    repeat (20) @(negedge clk);
    // Random run with the reference model, re-synchronised by a reset
    rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    cyc = 0; q_h.delete(); q_t.delete();
    for (int i = 0; i < 6000; i++) begin
      int busy;
      busy = ((i / 500) % 3 == 2) ? 60 : 8;
      hits = ((i / 500) % 3 == 1) ? '0 : rnd_hits(busy);
      ref_step(hits);
      @(negedge clk);
      checks++;
      if (pkt_v !== exp_v || lost !== exp_lost || (exp_v && pkt !== exp_p)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: v=%0b/%0b lost=%0b/%0b pkt=%p exp=%p",
                                    i, pkt_v, exp_v, lost, exp_lost, pkt, exp_p);
      end
      if (lost) n_lost++;
      if (pkt_v) n_pkts++;
      if (pkt_v && pkt.delay != 0) n_delayed++;
    end
    $display("packets=%0d delayed=%0d lost=%0d", n_pkts, n_delayed, n_lost);
    checks++;
    if (n_lost == 0 || n_delayed == 0) begin failures++; $display("FAIL: no loss or no delay seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ldemux: self-checking testbench of the ldemux decompressor.
//
// The testbench draws random hit vectors for 3000 bunch crossings and
// schedules their non-empty partitions on the link itself: each partition
// takes the first free clock at or after its BX, and is kept only if it waits
// at most 7 clocks. The resulting packet stream drives the ldemux, and every
// clock frame_o must equal the kept partitions of the BX that arrived
// MAX_DELAY+2 = 9 clocks earlier.
module tb_ldemux;
  import rpc_ro_pkg::*;

  localparam int N = 3000;
  localparam int LAT = MAX_DELAY + 2;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  packet_t pkt;
  logic    pkt_v;
  hits_t   frame;
  int      checks = 0, failures = 0, n_nonzero = 0, n_delayed = 0;

  ldemux dut (.clk(clk), .rst_n(rst_n), .pkt_i(pkt), .pkt_valid_i(pkt_v), .frame_o(frame));

  always #5 clk = ~clk;

  hits_t   expf  [N + 32];
  packet_t sched [N + 32];
  logic    sv    [N + 32];

  initial begin
    for (int t = 0; t < N + 32; t++) begin expf[t] = '0; sv[t] = 1'b0; sched[t] = '0; end
    for (int b = 0; b < N; b++) begin
      for (int p = 0; p < N_PART; p++) begin
        if (($urandom % 100) < 25) begin
          logic [3:0] d4;
          int t;
          d4 = 4'($urandom_range(1, 15));
          t = b;
          while (sv[t]) t++;
          if (t - b <= int'(MAX_DELAY)) begin
            sv[t] = 1'b1;
            sched[t].data  = d4;
            sched[t].pnum  = PNUM_BITS'(p);
            sched[t].delay = DELAY_BITS'(t - b);
            sched[t].eod   = 1'b0;
            expf[b][p*PART_BITS +: PART_BITS] = d4;
          end
        end
      end
    end
    pkt = '0; pkt_v = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N + 16; t++) begin
      pkt = sched[t]; pkt_v = sv[t];
      if (sv[t] && sched[t].delay != 0) n_delayed++;
      @(posedge clk);
      #1;
      // frame of BX t-LAT+1 is visible now (after the edge ending clock t)
      if (t - LAT + 1 >= 0) begin
        checks++;
        if (frame !== expf[t - LAT + 1]) begin
          failures++;
          if (failures < 10) $display("FAIL bx %0d: got %h exp %h", t - LAT + 1, frame, expf[t - LAT + 1]);
        end
        if (frame != 0) n_nonzero++;
      end
      @(negedge clk);
    end
    checks++;
    if (n_nonzero < 100 || n_delayed < 100) begin
      failures++; $display("FAIL: too little traffic %0d %0d", n_nonzero, n_delayed);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

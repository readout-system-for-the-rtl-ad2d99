// tb_rack_merger: self-checking testbench of the DAQ MRB's rack event merger.
//
// The testbench models the two crate event buffers (one clock read latency)
// and fills them with crate events of random length, crate 1 running late by
// a random amount. Each rack event on the output stream must be: the two
// header words, then the body of crate 0, then the body of crate 1, with sop
// on the first word and eop on the last. The ready input is random in one
// phase and always high in another, where a rack event must flow at one word
// per clock. The last event carries a wrong event number in crate 1 and must
// set sync_err_o, which must stay low before that. Events 200..249 run in
// autonomous mode: no header words, and an event with no packets sends nothing.
module tb_rack_merger;
  import rpc_ro_pkg::*;

  localparam int NEV = 300;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] done [2];
  logic [2:0]  rd_page;
  logic [7:0]  rd_addr;
  logic        rd_len;
  word_t       rd_data [2];
  logic [15:0] merged;
  word_t       dout;
  logic        dvalid, dsop, deop, dready, sync_err;
  logic        ttc = 1'b1;
  int          checks = 0, failures = 0, cyc = 0;
  int          n_full_rate = 0, n_stall = 0, n_empty = 0, n_auto_empty = 0;

  // events 200..249 are merged in autonomous mode (no header words)
  function automatic logic ttc_ev(input int k);
    return !(k >= 200 && k < 250);
  endfunction

  rack_merger dut (
    .clk(clk), .rst_n(rst_n), .ttc_mode_i(ttc), .done_i(done), .rd_page_o(rd_page), .rd_addr_o(rd_addr),
    .rd_len_o(rd_len), .rd_data_i(rd_data), .merged_o(merged), .dout_o(dout),
    .dvalid_o(dvalid), .dsop_o(dsop), .deop_o(deop), .dready_i(dready), .sync_err_o(sync_err));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  word_t cbuf [2][8][256];
  int    clen [2][8];
  word_t crate_ev [2][NEV][$];
  word_t rack_ev  [NEV][$];

  always @(posedge clk)
    for (int c = 0; c < 2; c++)
      rd_data[c] <= rd_len ? word_t'(clen[c][rd_page]) : cbuf[c][rd_page][rd_addr];

  initial begin
    for (int k = 0; k < NEV; k++) begin
      int nb [2];
      for (int c = 0; c < 2; c++) begin
        if (ttc_ev(k)) begin
          crate_ev[c][k].push_back(mk_evh(14'(k + ((c == 1 && k == NEV - 1) ? 1 : 0))));
          crate_ev[c][k].push_back(mk_bxh(12'(k * 7)));
        end
        nb[c] = ($urandom % 4 == 0) ? 0 : $urandom_range(1, 40);
        for (int i = 0; i < nb[c]; i++) crate_ev[c][k].push_back(word_t'($urandom));
      end
      if (nb[0] == 0 && nb[1] == 0) n_empty++;
      rack_ev[k] = crate_ev[0][k];
      for (int i = ttc_ev(k) ? 2 : 0; i < crate_ev[1][k].size(); i++) rack_ev[k].push_back(crate_ev[1][k][i]);
    end
  end

  // Crate producers
  for (genvar c = 0; c < 2; c++) begin : g_prod
    initial begin
      done[c] = '0;
      @(posedge rst_n);
      for (int k = 0; k < NEV; k++) begin
        if (k == 200 || k == 250) begin
          // change the mode only when every earlier event has been merged
          while (merged != 16'(k)) @(negedge clk);
          ttc = (k == 250);
        end
        repeat ($urandom_range(0, c == 0 ? 20 : 40)) @(negedge clk);
        while (16'(done[c] - merged) >= 16'd8) @(negedge clk);
        foreach (crate_ev[c][k][i]) cbuf[c][k % 8][i] = crate_ev[c][k][i];
        clen[c][k % 8] = crate_ev[c][k].size();
        @(negedge clk);
        done[c] = done[c] + 16'd1;
      end
    end
  end

  // Ready: random for the first half, then always high
  always @(negedge clk) dready <= (cyc < 4000) ? ($urandom % 3 != 0) : 1'b1;

  // Checker
  initial begin
    int k, i, t_sop;
    k = 0; i = 0; t_sop = 0;
    dready = 1'b0;
    #3 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (k < NEV) begin
      if (rack_ev[k].size() == 0) begin   // empty autonomous event: no words
        n_auto_empty++;
        k++;
        continue;
      end
      @(posedge clk);
      if (dvalid && !dready) n_stall++;
      if (dvalid && dready) begin
        checks++;
        if (dout !== rack_ev[k][i] || dsop !== (i == 0) || deop !== (i == rack_ev[k].size() - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL ev %0d word %0d: %h sop %0b eop %0b exp %h", k, i, dout, dsop, deop, rack_ev[k][i]);
        end
        if (i == 0) t_sop = cyc;
        if (deop) begin
          if (cyc >= 4000 && t_sop >= 4000 && cyc - t_sop == rack_ev[k].size() - 1 && rack_ev[k].size() > 20)
            n_full_rate++;
          if (k < NEV - 1) begin
            checks++;
            if (sync_err) begin failures++; $display("FAIL: sync_err before event %0d", k); end
          end
          k++; i = 0;
        end else i++;
      end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (!sync_err) begin failures++; $display("FAIL: header mismatch not flagged"); end
    checks++;
    if (n_full_rate == 0 || n_stall == 0 || n_empty == 0 || n_auto_empty == 0 || merged != 16'(NEV)) begin
      failures++; $display("FAIL: full_rate=%0d stall=%0d empty=%0d merged=%0d", n_full_rate, n_stall, n_empty, merged);
    end
    $display("full_rate=%0d stall=%0d empty=%0d auto_empty=%0d", n_full_rate, n_stall, n_empty, n_auto_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

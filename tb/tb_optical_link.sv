// tb_optical_link: checks that the link model delivers every packet unchanged
// exactly LATENCY clocks later (run at a LATENCY of 5 and at the default).
module tb_optical_link;
  import rpc_ro_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  packet_t pin, pout_a, pout_b;
  logic    vin, vout_a, vout_b;
  int      checks = 0, failures = 0;
  packet_t hist_p [0:4095];
  logic    hist_v [0:4095];

  optical_link #(.LATENCY(5)) dut_a (.clk(clk), .rst_n(rst_n), .pkt_i(pin), .pkt_valid_i(vin),
                                     .pkt_o(pout_a), .pkt_valid_o(vout_a));
  optical_link dut_b (.clk(clk), .rst_n(rst_n), .pkt_i(pin), .pkt_valid_i(vin),
                      .pkt_o(pout_b), .pkt_valid_o(vout_b));

  always #5 clk = ~clk;

  initial begin
    pin = '0; vin = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      pin = packet_t'($urandom); vin = 1'($urandom);
      hist_p[t] = pin; hist_v[t] = vin;
      @(posedge clk); #1;
      // after the edge ending clock t the output shows the input of clock t-L+1
      if (t >= 4) begin
        checks++;
        if (vout_a !== hist_v[t-4] || (vout_a && pout_a !== hist_p[t-4])) failures++;
      end else begin
        checks++;
        if (vout_a !== 1'b0) failures++;
      end
      if (t >= 17) begin
        checks++;
        if (vout_b !== hist_v[t-17] || (vout_b && pout_b !== hist_p[t-17])) failures++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// optical_link: behavioural model of an optical link with its splitter.
//
// The serialiser, fibre (about 90 m from the detector to the counting room)
// and deserialiser are modelled only by what the logic downstream sees: the
// packet stream arrives unchanged after a fixed number of clocks. The default
// LATENCY of 18 clocks is this design's estimate (90 m of fibre at about
// 5 ns/m is 450 ns, 18 periods of 25 ns); transmission errors and link
// synchronisation are not modelled. The splitter is the fan-out of the output
// to the trigger and the readout, done by wiring in the top level.
module optical_link
  import rpc_ro_pkg::*;
#(
  parameter int unsigned LATENCY = 18  // clocks, >= 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  packet_t pkt_i,
  input  logic    pkt_valid_i,
  output packet_t pkt_o,
  output logic    pkt_valid_o
);

  packet_t pipe_pkt [LATENCY];
  logic    pipe_v   [LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) begin
        pipe_pkt[i] <= '0;
        pipe_v[i]   <= 1'b0;
      end
    end else begin
      pipe_pkt[0] <= pkt_i;
      pipe_v[0]   <= pkt_valid_i;
      for (int i = 1; i < LATENCY; i++) begin
        pipe_pkt[i] <= pipe_pkt[i-1];
        pipe_v[i]   <= pipe_v[i-1];
      end
    end
  end

  assign pkt_o       = pipe_pkt[LATENCY-1];
  assign pkt_valid_o = pipe_v[LATENCY-1];

endmodule

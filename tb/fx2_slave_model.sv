// fx2_slave_model: behavioural model of the FX2LP slave-FIFO write side
// (testbench only, not synthesizable).
//
// On each rising clock edge with SLWR low the word on FD enters the endpoint
// buffer, which holds CAP words. FLAGB is high while the buffer has room
// and is updated at the same edge. While `host_ready` is high the host takes
// one word every DRAIN_CYCLES clocks; words taken by the host are kept in
// `host` in arrival order. A write into a full buffer counts an overrun.
module fx2_slave_model #(
  parameter int unsigned CAP          = 256,
  parameter int unsigned DRAIN_CYCLES = 2
) (
  input  logic        clk,
  input  logic        slwr_n,
  input  logic [15:0] fd,
  input  logic        host_ready,
  output logic        flagb
);

  logic [15:0] ep [$];
  logic [15:0] host [$];
  int overruns   = 0;
  int writes     = 0;
  int full_edges = 0;
  int drain_cnt  = 0;

  initial flagb = 1'b1;

  always @(posedge clk) begin
    if (!slwr_n) begin
      writes++;
      if (ep.size() >= CAP) overruns++;
      else ep.push_back(fd);
    end
    if (host_ready && ep.size() > 0) begin
      if (drain_cnt >= int'(DRAIN_CYCLES) - 1) begin
        host.push_back(ep.pop_front());
        drain_cnt = 0;
      end else begin
        drain_cnt++;
      end
    end
    flagb <= (ep.size() < CAP);
    if (ep.size() >= CAP) full_edges++;
  end

endmodule

// pam_system_harness: one complete receiver system for the testbenches
// (testbench only, not synthesizable).
//
// Instantiates pam_receiver_top with the given channel count and packet
// rate, N_CH node models sampling at about SAMPLE_HZ with individual
// periods and phases, inverting optical receivers and an FX2LP model whose
// host stops reading for STALL_MS. After RUN_MS it decodes the host stream
// and checks packet framing and checksums, that every reading of every
// channel reached the host in order, and that the endpoint-full condition
// occurred. Reading k of channel c (from 1) carries {c[4:0], k[10:0]}.
// `done` rises when the checks are finished; `checks` and `failures` hold
// the counts.
module pam_system_harness
  import pam_pkg::*;
#(
  parameter int unsigned N_CH      = 8,
  parameter int unsigned SAMPLE_HZ = 1_000,
  parameter int unsigned PACKET_HZ = 2_000,
  parameter int unsigned RUN_MS    = 20,
  parameter int unsigned STALL_MS  = 8
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned CLK_HZ  = 24_000_000;
  localparam int unsigned BITC    = CLK_HZ / 500_000;
  localparam int unsigned SAMPLE  = CLK_HZ / SAMPLE_HZ;
  localparam int unsigned MS      = CLK_HZ / 1_000;

  logic clk = 1'b0;
  always #20.833 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL (N_CH=%0d, %0d Hz): %s", N_CH, SAMPLE_HZ, what);
    end
  endtask

  logic [N_CH-1:0] line, busy, serial_in, ch_active;
  int  sent [N_CH];
  bit  running = 1'b1;

  for (genvar c = 0; c < N_CH; c++) begin : g_node
    node_tx_model #(.BIT_CYCLES(BITC)) u_node (.clk(clk), .line(line[c]), .busy(busy[c]));
    assign serial_in[c] = ~line[c];
    initial begin
      int period;
      period  = int'(SAMPLE) + (c * 7) - 40;
      sent[c] = 0;
      repeat (200 + c * 613) @(posedge clk);
      while (running) begin
        u_node.send_value({5'(c + 1), 11'(sent[c])});
        sent[c]++;
        repeat (period - 2 * 16 * int'(BITC)) @(posedge clk);
      end
    end
  end

  logic flagb, host_ready;
  logic SLWR, PKTEND, SLRD, SLOE, FIFOADR0, FIFOADR1, CLK24, LD0, LD1, LD2, LD3;
  logic [15:0] FD;

  fx2_slave_model #(.CAP(256), .DRAIN_CYCLES(2)) u_fx2 (
    .clk(clk), .slwr_n(SLWR), .fd(FD), .host_ready(host_ready), .flagb(flagb));

  pam_receiver_top #(.N_CH(N_CH), .PACKET_HZ(PACKET_HZ)) dut (
    .CLKin(clk), .serial_in(serial_in), .FLAGB(flagb), .pll_c0(clk), .CLK24(CLK24),
    .SLWR(SLWR), .PKTEND(PKTEND), .SLRD(SLRD), .SLOE(SLOE), .FIFOADR0(FIFOADR0),
    .FIFOADR1(FIFOADR1), .FD(FD), .LD0(LD0), .LD1(LD1), .LD2(LD2), .LD3(LD3),
    .ch_active(ch_active));

  int flagb_low = 0, pkt_starts = 0;
  always @(posedge clk) begin
    if (!flagb) flagb_low++;
    if (!dut.rst && dut.send) pkt_starts++;
  end

  initial begin
    int nw, p, pos, missing;
    int last_k [N_CH];
    bit seen [N_CH][int];
    logic [15:0] x, w;
    done = 1'b0;
    checks = 0;
    failures = 0;
    host_ready = 1'b1;
    repeat (2 * MS) @(posedge clk);
    host_ready = 1'b0;
    repeat (STALL_MS * MS) @(posedge clk);
    host_ready = 1'b1;
    repeat ((RUN_MS - 2 - STALL_MS) * MS) @(posedge clk);
    running = 1'b0;
    repeat (MS) @(posedge clk);

    nw = u_fx2.host.size();
    p  = nw / int'(N_CH + 2);
    check(nw % int'(N_CH + 2) == 0, $sformatf("host got %0d words, not whole packets", nw));
    check(p == pkt_starts, $sformatf("%0d packets at host, %0d sent", p, pkt_starts));
    check(p >= int'(RUN_MS * PACKET_HZ / 1000) - 2, $sformatf("%0d packets in %0d ms", p, RUN_MS));
    foreach (last_k[c]) last_k[c] = -1;
    for (int i = 0; i < p; i++) begin
      pos = i * int'(N_CH + 2);
      check(u_fx2.host[pos] == PACKET_START_WORD, $sformatf("packet %0d start word", i));
      x = '0;
      for (int c = 0; c < int'(N_CH); c++) begin
        w = u_fx2.host[pos + 1 + c];
        x ^= w;
        if (w != 16'h0000) begin
          check(int'(w[15:11]) == c + 1, $sformatf("packet %0d word from channel %0d", i, w[15:11]));
          check(int'(w[10:0]) >= last_k[c], $sformatf("channel %0d reading went back", c + 1));
          last_k[c] = int'(w[10:0]);
          seen[c][int'(w[10:0])] = 1'b1;
        end
      end
      check(u_fx2.host[pos + N_CH + 1] == x, $sformatf("packet %0d checksum", i));
    end
    for (int c = 0; c < int'(N_CH); c++) begin
      missing = 0;
      for (int k = 0; k < sent[c] - 1; k++) if (!seen[c].exists(k)) missing++;
      check(sent[c] > 0 && missing == 0,
            $sformatf("channel %0d: %0d of %0d readings missing", c + 1, missing, sent[c]));
    end
    check(u_fx2.overruns == 0, "no endpoint overruns");
    check(flagb_low > 0, "endpoint full (FLAGB low) happened");
    check(ch_active == '1, "all channels active");
    $display("system N_CH=%0d sampling=%0d Hz packets=%0d Hz: %0d packets, %0d readings on channel 1, FLAGB low %0d clocks",
             N_CH, SAMPLE_HZ, PACKET_HZ, p, sent[0], flagb_low);
    done = 1'b1;
  end
endmodule

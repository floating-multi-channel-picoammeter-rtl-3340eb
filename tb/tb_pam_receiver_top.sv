// tb_pam_receiver_top: end-to-end test of the receiver at its default
// parameters (8 channels, 24 MHz, 500 kbps, 2 kHz packets, 16k-word FIFO).
//
// Eight node models send readings at about 1 kHz, each with its own
// period and phase; reading k of channel c (1..8) carries the value
// {c[3:0], k[11:0]}, so every packet word can be traced back. The optical
// receivers are modelled as inverters between node and FPGA. An FX2LP
// model takes the words; the host stops reading for 20 ms, which fills the
// endpoint and drives FLAGB low so the FPGA FIFO has to hold the backlog.
// Channel 8 stops sending after a few readings, so its `active` lamp must
// go out after the 10 ms timeout.
//
// The host stream is then cut into packets and checked: start word, XOR
// checksum, one word per channel; per channel the reading numbers never go
// backwards and no reading a node sent is missing, which is what packing
// at twice the sampling rate guarantees. Also checked: the 2 kHz packet
// period at the packetizer, the 6.4 % transmitter duty cycle of a node,
// and that every mechanism (readings per channel, packets, endpoint full,
// FIFO backlog, channel timeout) happened at least once.
module tb_pam_receiver_top;
  import pam_pkg::*;

  localparam int unsigned N_CH      = 8;
  localparam int unsigned CLK_HZ    = 24_000_000;
  localparam int unsigned BITC      = CLK_HZ / 500_000;
  localparam int unsigned PKT_CYC   = CLK_HZ / 2_000;
  localparam int unsigned SAMPLE    = CLK_HZ / 1_000;
  localparam int unsigned MS        = CLK_HZ / 1_000;
  localparam int unsigned RUN_MS    = 40;
  localparam int unsigned STOP_CH8  = 5;   // readings channel 8 sends

  logic clk = 1'b0;
  always #20.833 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat ((RUN_MS + 20) * MS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- nodes and optical receivers ----------------
  logic [N_CH-1:0] line, busy, serial_in;
  int sent [N_CH];        // readings each node has completed
  bit  running = 1'b1;

  for (genvar c = 0; c < N_CH; c++) begin : g_node
    node_tx_model #(.BIT_CYCLES(BITC)) u_node (.clk(clk), .line(line[c]), .busy(busy[c]));
    assign serial_in[c] = ~line[c];
    initial begin
      int period = SAMPLE + (c * 37) - 120;    // free-running, ~1 kHz each
      sent[c] = 0;
      repeat (200 + c * 2911) @(posedge clk);
      while (running && !(c == N_CH - 1 && sent[c] == STOP_CH8)) begin
        u_node.send_value({4'(c + 1), 12'(sent[c])});
        sent[c]++;
        repeat (period - 2 * 16 * BITC) @(posedge clk);
      end
    end
  end

  // ---------------- FX2LP and host ----------------
  logic flagb, host_ready, pll_c0;
  logic SLWR, PKTEND, SLRD, SLOE, FIFOADR0, FIFOADR1, CLK24;
  logic [15:0] FD;
  logic LD0, LD1, LD2, LD3;
  logic [N_CH-1:0] ch_active;

  assign pll_c0 = clk;
  fx2_slave_model #(.CAP(256), .DRAIN_CYCLES(2)) u_fx2 (
    .clk(clk), .slwr_n(SLWR), .fd(FD), .host_ready(host_ready), .flagb(flagb));

  pam_receiver_top dut (
    .CLKin(clk), .serial_in(serial_in), .FLAGB(flagb), .pll_c0(pll_c0), .CLK24(CLK24),
    .SLWR(SLWR), .PKTEND(PKTEND), .SLRD(SLRD), .SLOE(SLOE), .FIFOADR0(FIFOADR0),
    .FIFOADR1(FIFOADR1), .FD(FD), .LD0(LD0), .LD1(LD1), .LD2(LD2), .LD3(LD3),
    .ch_active(ch_active));

  // ---------------- monitors ----------------
  int  readings [N_CH];
  int  flagb_low = 0, max_backlog = 0, pkt_starts = 0, period_bad = 0;
  int  busy_cycles = 0, ch8_was_active = 0, ld_bad = 0;
  longint last_pkt = -1;
  initial foreach (readings[c]) readings[c] = 0;
  for (genvar c = 0; c < N_CH; c++) begin : g_mon
    always @(posedge clk) if (!dut.rst && dut.g_sensor[c].sensor.strobe) readings[c]++;
  end

  always @(posedge clk) begin
    if (!flagb) flagb_low++;
    if (!dut.rst && int'(dut.f_used) > max_backlog) max_backlog = int'(dut.f_used);
    if (dut.send) begin
      pkt_starts++;
      if (last_pkt >= 0 && cycle - last_pkt != PKT_CYC) period_bad++;
      last_pkt = cycle;
    end
    if (busy[0]) busy_cycles++;
    if (ch_active[N_CH-1]) ch8_was_active = 1;
    if (LD1 != ~ch_active[0] || LD2 != ~ch_active[1] || LD3 != flagb) ld_bad++;
  end

  // ---------------- stimulus and checks ----------------
  initial begin
    int nw, p, pos;
    int last_k [N_CH];
    bit seen [N_CH][int];
    logic [15:0] x, w;
    longint t0;
    int busy0;

    host_ready = 1'b1;
    repeat (4 * MS) @(posedge clk);
    host_ready = 1'b0;                      // host busy for 20 ms
    repeat (20 * MS) @(posedge clk);
    host_ready = 1'b1;
    // Duty cycle of node 1 over exactly 10 of its sample periods.
    busy0 = busy_cycles;
    t0 = cycle;
    repeat (10 * (SAMPLE - 120)) @(posedge clk);
    check(busy_cycles - busy0 == 10 * 32 * BITC,
          $sformatf("node TX busy %0d cycles in 10 samples", busy_cycles - busy0));
    check((busy_cycles - busy0) * 1000 / (10 * SAMPLE) == 64,
          "transmitter duty cycle 6.4 % at 1 kHz");
    repeat ((RUN_MS - 24) * MS - 10 * (SAMPLE - 120)) @(posedge clk);
    running = 1'b0;
    repeat (MS) @(posedge clk);             // drain

    // Cut the host stream into packets.
    nw = u_fx2.host.size();
    p = nw / (N_CH + 2);
    check(nw % (N_CH + 2) == 0, $sformatf("host got %0d words, not whole packets", nw));
    check(p == pkt_starts, $sformatf("%0d packets at host, %0d sent", p, pkt_starts));
    check(p >= int'(RUN_MS * 2) - 2, $sformatf("%0d packets in %0d ms at 2 kHz", p, RUN_MS));
    foreach (last_k[c]) last_k[c] = -1;
    for (int i = 0; i < p; i++) begin
      pos = i * (N_CH + 2);
      check(u_fx2.host[pos] == PACKET_START_WORD, $sformatf("packet %0d start word %h", i, u_fx2.host[pos]));
      x = '0;
      for (int c = 0; c < N_CH; c++) begin
        w = u_fx2.host[pos + 1 + c];
        x ^= w;
        if (w != 16'h0000 || last_k[c] >= 0) begin
          check(int'(w[15:12]) == c + 1, $sformatf("packet %0d word %0d from channel %0d", i, c + 1, w[15:12]));
          check(int'(w[11:0]) >= last_k[c], $sformatf("channel %0d reading went back", c));
          last_k[c] = int'(w[11:0]);
          seen[c][int'(w[11:0])] = 1'b1;
        end
      end
      check(u_fx2.host[pos + N_CH + 1] == x, $sformatf("packet %0d checksum", i));
    end
    for (int c = 0; c < N_CH; c++) begin
      int missing;
      missing = 0;
      for (int k = 0; k < sent[c] - 1; k++) if (!seen[c].exists(k)) missing++;
      check(missing == 0, $sformatf("channel %0d: %0d of %0d readings missing", c, missing, sent[c]));
      check(readings[c] == sent[c], $sformatf("channel %0d: %0d received, %0d sent", c, readings[c], sent[c]));
      check(readings[c] > 0, $sformatf("channel %0d never received", c));
    end
    check(u_fx2.overruns == 0, "no endpoint overruns");
    check(period_bad == 0, "packet strobes 1/2 kHz apart");
    check(ld_bad == 0, "LD1, LD2, LD3 follow channel 1/2 activity and FLAGB");
    check(PKTEND && SLRD && SLOE && !FIFOADR0 && !FIFOADR1, "FX2LP control pins at fixed levels");
    // Mechanisms.
    check(flagb_low > 0, "endpoint full (FLAGB low) happened");
    check(max_backlog > int'(N_CH + 2), $sformatf("FIFO backlog %0d words", max_backlog));
    check(ch8_was_active == 1 && ch_active[N_CH-1] == 1'b0, "channel 8 timed out");
    check(ch_active[N_CH-2:0] == '1, "channels 1..7 active");
    $display("mechanisms: packets=%0d flagb_low_cycles=%0d max_fifo_backlog=%0d ch8_timeout=%0d",
             pkt_starts, flagb_low, max_backlog, !ch_active[N_CH-1]);
    for (int c = 0; c < N_CH; c++) $display("  channel %0d readings=%0d sent=%0d", c + 1, readings[c], sent[c]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// pam_receiver_top: FPGA receiver of the floating multi-channel picoammeter.
//
// Each floating measurement node digitises its current with a sigma-delta
// ADC about 1000 times a second and sends every 16-bit reading over its own
// plastic optical fibre as two 16-bit serial frames at 500 kbps. This FPGA
// receives N_CH such links, packs the latest reading of every channel into
// one packet 2000 times a second, buffers the packets in a 16k-word FIFO and
// streams them to a Cypress FX2LP USB controller for the host PC.
//
//   serial_in[i] --> sensor_rx[i] --data--> packetizer --> fifo_mega --> fifo_fx2ip --> FD/SLWR
//                                               ^
//                     data_clocker --strobe-----+      reset_gen --> rst (all blocks)
//
// Every block runs on CLKin. The optical receivers' outputs are inverted at
// each sensor_rx input, as the published block diagram marks, so the
// decoded line idles at 0. The FX2LP pins that this design never toggles
// are tied to the fixed levels shown in that diagram: PKTEND, SLRD and SLOE
// high (inactive), FIFOADR[1:0] = 0. The PLL that makes the FX2LP's 24 MHz
// interface clock is vendor IP and lies outside this module: its output
// enters on pll_c0 and leaves on CLK24.
//
// Indicators: LD0 blinks while packets are being produced, LD1 and LD2 are
// low-active "channel 1/2 active" lamps, LD3 shows FLAGB, and ch_active has
// one active-high lamp per channel for the receiver daughter board. The
// mapping of LD1, LD2 and LD3 and the per-channel lamps are this design's
// reading of the diagram.
//
// Defaults follow the document where it gives a number (8 channels as in
// the FPGA block diagram, 500 kbps, 2 kHz packets, 16k-word FIFO); the
// 24 MHz clock is this design's choice.
module pam_receiver_top #(
  parameter int unsigned N_CH                  = 8,
  parameter int unsigned CLK_HZ                = 24_000_000,
  parameter int unsigned BAUD                  = 500_000,
  parameter int unsigned PACKET_HZ             = 2_000,
  parameter int unsigned FIFO_DEPTH            = 16_384,
  parameter int unsigned ACTIVE_TIMEOUT_CYCLES = CLK_HZ / 100,
  parameter int unsigned BLINK_STROBES         = 1_000,
  parameter int unsigned RESET_CYCLES          = 64
) (
  input  logic              CLKin,
  input  logic [N_CH-1:0]   serial_in,   // optical receiver outputs, channel 1 = bit 0
  input  logic              FLAGB,       // FX2LP endpoint flag, 1 = room
  input  logic              pll_c0,      // 24 MHz from the PLL
  output logic              CLK24,       // FX2LP interface clock
  output logic              SLWR,
  output logic              PKTEND,
  output logic              SLRD,
  output logic              SLOE,
  output logic              FIFOADR0,
  output logic              FIFOADR1,
  output logic [15:0]       FD,
  output logic              LD0,
  output logic              LD1,
  output logic              LD2,
  output logic              LD3,
  output logic [N_CH-1:0]   ch_active
);

  initial begin
    assert (N_CH >= 2) else $error("pam_receiver_top: N_CH must be at least 2");
  end

  logic        rst;
  logic [15:0] ch_data [N_CH];
  logic [N_CH-1:0] ch_strobe;
  logic        send, led_blink;
  logic        pk_write;
  logic [15:0] pk_word;
  logic        f_rd, f_empty, f_full;
  logic [15:0] f_q;
  logic [$clog2(FIFO_DEPTH):0] f_used;

  reset_gen #(.RESET_CYCLES(RESET_CYCLES)) reset_1 (.clk(CLKin), .rst(rst));

  for (genvar i = 0; i < N_CH; i++) begin : g_sensor
    sensor_rx #(
      .CLK_HZ(CLK_HZ), .BAUD(BAUD), .ACTIVE_TIMEOUT_CYCLES(ACTIVE_TIMEOUT_CYCLES)
    ) sensor (
      .clk(CLKin), .rst(rst), .data_in(~serial_in[i]),
      .data(ch_data[i]), .strobe(ch_strobe[i]), .active(ch_active[i]));
  end

  data_clocker #(
    .CLK_HZ(CLK_HZ), .PACKET_HZ(PACKET_HZ), .BLINK_STROBES(BLINK_STROBES)
  ) data_clocker_inst (.clk(CLKin), .rst(rst), .led_blink(led_blink), .strobe(send));

  packetizer #(.N_CH(N_CH)) pack_inst (
    .clk(CLKin), .rst(rst), .send(send), .i_word(ch_data),
    .write(pk_write), .fx_byte(pk_word));

  fifo_mega #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) fifo_inst (
    .clock(CLKin), .rst(rst), .rdreq(f_rd), .wrreq(pk_write), .data(pk_word),
    .empty(f_empty), .full(f_full), .usedw(f_used), .q(f_q));

  fifo_fx2ip fx2ip_inst (
    .clk(CLKin), .rst(rst), .empty(f_empty), .flags(FLAGB), .i_word(f_q),
    .read(f_rd), .write(SLWR), .o_word(FD));

  assign CLK24    = pll_c0;
  assign PKTEND   = 1'b1;
  assign SLRD     = 1'b1;
  assign SLOE     = 1'b1;
  assign FIFOADR0 = 1'b0;
  assign FIFOADR1 = 1'b0;

  assign LD0 = led_blink;
  assign LD1 = ~ch_active[0];
  assign LD2 = ~ch_active[1];
  assign LD3 = FLAGB;

  // A packet never lands in a full FIFO while the host keeps up; if it does
  // the words are dropped, which the simulation flags here.
  always_ff @(posedge CLKin) begin
    if (!rst && pk_write && f_full)
      $warning("pam_receiver_top: FIFO full, packet word dropped");
  end

endmodule

// data_clocker: packet-rate timebase of the receiver.
//
// Nodes deliver readings asynchronously at about 1 kHz, so the receiver
// reads all channels at twice that rate: every CLK_HZ/PACKET_HZ clocks
// `strobe` is high for one clock and the packetizer starts a packet. A second
// counter toggles `led_blink` every BLINK_STROBES strobes, giving a visible
// heartbeat on a board LED (1 Hz blink with the defaults).
//
// The 2 kHz packet rate follows the document; the clock rate and the blink
// rate are this design's own choices. The first strobe comes
// CLK_HZ/PACKET_HZ clocks after reset is released. Reset is synchronous and
// active high.
module data_clocker #(
  parameter int unsigned CLK_HZ        = 24_000_000,
  parameter int unsigned PACKET_HZ     = 2_000,
  parameter int unsigned BLINK_STROBES = 1_000
) (
  input  logic clk,
  input  logic rst,
  output logic led_blink,
  output logic strobe
);

  localparam int unsigned PERIOD = CLK_HZ / PACKET_HZ;
  localparam int unsigned PW     = $clog2(PERIOD);
  localparam int unsigned BW     = $clog2(BLINK_STROBES);

  initial begin
    assert (PERIOD >= 2) else $error("data_clocker: PERIOD must be at least 2");
    assert (BLINK_STROBES >= 2) else $error("data_clocker: BLINK_STROBES must be at least 2");
  end

  logic [PW-1:0] div_cnt;
  logic [BW-1:0] blink_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      div_cnt   <= '0;
      blink_cnt <= '0;
      strobe    <= 1'b0;
      led_blink <= 1'b0;
    end else begin
      strobe <= 1'b0;
      if (div_cnt == PW'(PERIOD - 1)) begin
        div_cnt <= '0;
        strobe  <= 1'b1;
        if (blink_cnt == BW'(BLINK_STROBES - 1)) begin
          blink_cnt <= '0;
          led_blink <= ~led_blink;
        end else begin
          blink_cnt <= blink_cnt + 1'b1;
        end
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end
  end

endmodule

// sensor_rx: receiver for one measurement node's optical serial link.
//
// A node sends each 16-bit current reading as two 16-bit asynchronous
// frames (see pam_pkg::node_frame_t): start bit 1, 6-bit address, 8-bit data,
// stop bit 0, MSB first, at BAUD bits per second. The line therefore idles at
// 0 and a frame begins with a 0->1 edge. The receiver synchronises data_in
// with two flip-flops, waits half a bit after the edge, re-checks the start
// bit, then samples the remaining 15 bits in the middle of each bit period.
// A frame whose stop bit is not 0 is dropped, together with any upper byte
// still waiting for its partner. The frame with address
// CUR_ADDR_MSB stores the upper byte; the following frame with address
// CUR_ADDR_LSB completes the value, which is then copied to `data` and
// announced by a one-clock `strobe`. Frames with other addresses (the node
// may send temperature or supply voltage this way) are ignored.
//
// `active` is high while a complete value has arrived within the last
// ACTIVE_TIMEOUT_CYCLES clocks; it drives the channel's indicator LED.
//
// Timing: `data` and `strobe` change 15.5 bit periods plus about three
// clocks (synchroniser and edge detection) after the start edge of the
// completing frame, i.e. in the middle of its stop bit. Back-to-back frames
// (stop bit immediately followed by the next start bit) are received.
//
// From the document: frame layout, 500 kbps rate, two words per value, the
// data/active outputs. This design's own choices: the clock rate, the two
// addresses and their byte order, mid-bit sampling, the stop-bit check and
// the 10 ms activity timeout. Reset is synchronous and active high.
module sensor_rx
  import pam_pkg::*;
#(
  parameter int unsigned CLK_HZ                = 24_000_000,
  parameter int unsigned BAUD                  = 500_000,
  parameter int unsigned ACTIVE_TIMEOUT_CYCLES = CLK_HZ / 100
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        data_in,  // serial line, idle 0, start bit 1
  output logic [15:0] data,     // last complete current value
  output logic        strobe,   // one clock: `data` has just been updated
  output logic        active    // a value arrived recently
);

  localparam int unsigned BIT_CYCLES = CLK_HZ / BAUD;
  localparam int unsigned HALF_BIT   = BIT_CYCLES / 2;
  localparam int unsigned CW         = $clog2(BIT_CYCLES + 1);
  localparam int unsigned TW         = $clog2(ACTIVE_TIMEOUT_CYCLES + 1);

  initial begin
    assert (BIT_CYCLES >= 4)
      else $error("sensor_rx: CLK_HZ/BAUD must be at least 4");
  end

  typedef enum logic [1:0] {S_IDLE, S_START, S_SHIFT} rx_state_t;

  rx_state_t       state;
  logic [2:0]      sync_q;
  logic [CW-1:0]   cnt;
  logic [3:0]      bit_idx;
  logic [14:0]     shreg;
  logic [7:0]      msb_byte;
  logic            msb_valid;
  logic [TW-1:0]   active_cnt;

  logic            din, din_prev, tick, last_bit;
  node_frame_t     frame;

  assign din      = sync_q[1];
  assign din_prev = sync_q[2];
  assign tick     = (cnt == '0);
  assign last_bit = (bit_idx == 4'(FRAME_BITS - 1));
  assign frame    = node_frame_t'({shreg, din});

  always_ff @(posedge clk) begin
    sync_q <= {sync_q[1:0], data_in};
    strobe <= 1'b0;
    if (active_cnt != '0) active_cnt <= active_cnt - 1'b1;

    if (rst) begin
      sync_q     <= '0;
      state      <= S_IDLE;
      cnt        <= '0;
      bit_idx    <= '0;
      shreg      <= '0;
      msb_byte   <= '0;
      msb_valid  <= 1'b0;
      data       <= '0;
      active_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (din == START_BIT_VALUE && din_prev != START_BIT_VALUE) begin
            state <= S_START;
            cnt   <= CW'(HALF_BIT - 1);
          end
        end
        S_START: begin
          if (!tick) begin
            cnt <= cnt - 1'b1;
          end else if (din == START_BIT_VALUE) begin
            state   <= S_SHIFT;
            shreg   <= 15'(START_BIT_VALUE);
            bit_idx <= 4'd1;
            cnt     <= CW'(BIT_CYCLES - 1);
          end else begin
            state <= S_IDLE;  // glitch, not a start bit
          end
        end
        S_SHIFT: begin
          if (!tick) begin
            cnt <= cnt - 1'b1;
          end else begin
            cnt     <= CW'(BIT_CYCLES - 1);
            bit_idx <= bit_idx + 1'b1;
            shreg   <= {shreg[13:0], din};
            if (last_bit) begin
              state <= S_IDLE;
              if (frame.start == START_BIT_VALUE && frame.stop == STOP_BIT_VALUE) begin
                if (frame.addr == CUR_ADDR_MSB) begin
                  msb_byte  <= frame.data;
                  msb_valid <= 1'b1;
                end else if (frame.addr == CUR_ADDR_LSB && msb_valid) begin
                  data       <= {msb_byte, frame.data};
                  strobe     <= 1'b1;
                  msb_valid  <= 1'b0;
                  active_cnt <= TW'(ACTIVE_TIMEOUT_CYCLES);
                end
              end else begin
                msb_valid <= 1'b0;  // broken frame: drop any pending upper byte
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign active = (active_cnt != '0);

endmodule

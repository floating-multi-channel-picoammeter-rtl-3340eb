// node_tx_model: behavioural model of a measurement node's serial output
// (testbench only, not synthesizable).
//
// The node's microcontroller shifts each 16-bit frame out MSB first at
// BIT_CYCLES clocks per bit: start bit 1, 6-bit address, 8-bit data, stop
// bit 0; the line idles at 0. One current reading is two frames sent back
// to back, upper byte first (addresses from pam_pkg). `busy` is high while
// a frame is on the line, which is when the node's transmitter LED is lit.
module node_tx_model
  import pam_pkg::*;
#(
  parameter int unsigned BIT_CYCLES = 100
) (
  input  logic clk,
  output logic line,
  output logic busy
);

  initial begin
    line = 1'b0;
    busy = 1'b0;
  end

  // Send any 16 bits as one frame, MSB first.
  task automatic send_raw(input logic [15:0] bits);
    busy = 1'b1;
    for (int i = 15; i >= 0; i--) begin
      line = bits[i];
      repeat (BIT_CYCLES) @(posedge clk);
    end
    line = 1'b0;
    busy = 1'b0;
  endtask

  task automatic send_frame(input logic [5:0] addr, input logic [7:0] data);
    node_frame_t f;
    f.start = START_BIT_VALUE;
    f.addr  = addr;
    f.data  = data;
    f.stop  = STOP_BIT_VALUE;
    send_raw(f);
  endtask

  // One current reading: two frames, back to back.
  task automatic send_value(input logic [15:0] value);
    send_frame(CUR_ADDR_MSB, value[15:8]);
    send_frame(CUR_ADDR_LSB, value[7:0]);
  endtask

endmodule

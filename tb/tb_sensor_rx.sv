// tb_sensor_rx: self-checking test of sensor_rx at 24 MHz and 500 kbps.
//
// A node model sends current readings as frame pairs. The test checks each
// received value, the single strobe per reading, the latency from the last
// frame's start edge to the strobe (15.5 bit periods plus the synchroniser),
// that frames with a bad stop bit, a lone lower-byte frame or a foreign
// address change nothing, and that `active` rises with the first value and
// falls after the activity timeout.
module tb_sensor_rx;
  import pam_pkg::*;

  localparam int unsigned CLK_HZ  = 24_000_000;
  localparam int unsigned BAUD    = 500_000;
  localparam longint BITC    = longint'(CLK_HZ) / longint'(BAUD);
  localparam int unsigned TIMEOUT = 20_000;

  logic clk = 1'b0;
  logic rst;
  logic line, busy;
  logic [15:0] data;
  logic strobe, active;

  int checks = 0, failures = 0;
  int strobes = 0;
  longint cycle = 0, strobe_cycle = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  node_tx_model #(.BIT_CYCLES(int'(BITC))) u_node (.clk(clk), .line(line), .busy(busy));

  sensor_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .ACTIVE_TIMEOUT_CYCLES(TIMEOUT)) dut (
    .clk(clk), .rst(rst), .data_in(line), .data(data), .strobe(strobe), .active(active));

  always @(posedge clk) if (strobe) begin
    strobes++;
    strobe_cycle = cycle;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v, prev;
    int s0;
    longint t_lsb;
    rst = 1'b1;
    idle(10);
    rst = 1'b0;
    idle(10);
    check(active == 1'b0, "active low after reset");
    check(data == 16'h0000, "data cleared by reset");

    // First reading, with latency measurement on the second frame.
    u_node.send_frame(CUR_ADDR_MSB, 8'h27);
    t_lsb = cycle;
    s0 = strobes;
    u_node.send_frame(CUR_ADDR_LSB, 8'hA3);
    idle(int'(BITC));
    check(strobes == s0 + 1, "one strobe per reading");
    check(data == 16'h27A3, $sformatf("value 27a3, got %h", data));
    check(active == 1'b1, "active after first value");
    check(strobe_cycle - t_lsb >= BITC * 15 + BITC / 2 &&
          strobe_cycle - t_lsb <= BITC * 15 + BITC / 2 + 4,
          $sformatf("latency %0d cycles", strobe_cycle - t_lsb));

    // Random readings, back to back.
    for (int i = 0; i < 20; i++) begin
      v  = 16'($urandom);
      s0 = strobes;
      u_node.send_value(v);
      idle(int'(BITC));
      check(strobes == s0 + 1 && data == v, $sformatf("random value %h got %h", v, data));
    end

    // Bad stop bit: the completing frame is dropped.
    prev = data;
    s0 = strobes;
    u_node.send_frame(CUR_ADDR_MSB, 8'h12);
    u_node.send_raw({START_BIT_VALUE, CUR_ADDR_LSB, 8'h34, ~STOP_BIT_VALUE});
    idle(int'(3 * BITC));
    check(strobes == s0 && data == prev, "bad stop bit ignored");

    // Lower byte without a fresh upper byte: no update.
    u_node.send_frame(CUR_ADDR_LSB, 8'h55);
    idle(int'(BITC));
    check(strobes == s0 && data == prev, "lone lower-byte frame ignored");

    // Foreign address between the two halves is ignored.
    u_node.send_frame(CUR_ADDR_MSB, 8'hBE);
    u_node.send_frame(6'd17, 8'h99);
    u_node.send_frame(CUR_ADDR_LSB, 8'hEF);
    idle(int'(BITC));
    check(strobes == s0 + 1 && data == 16'hBEEF, $sformatf("foreign address, got %h", data));

    // Short glitch is not taken as a start bit.
    s0 = strobes;
    line = 1'b1; u_node.busy = 1'b1;
    idle(int'(BITC) / 4);
    line = 1'b0;
    idle(int'(20 * BITC));
    check(strobes == s0 && data == 16'hBEEF, "glitch ignored");

    // Activity timeout.
    check(active == 1'b1, "still active before timeout");
    idle(TIMEOUT);
    check(active == 1'b0, "inactive after timeout");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

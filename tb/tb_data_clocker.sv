// tb_data_clocker: checks the packet strobe period and width, the delay of
// the first strobe after reset, and the LED toggle period, with the default
// 24 MHz clock and 2 kHz packet rate (12000 clocks per strobe) and a short
// blink divider of 4 strobes.
module tb_data_clocker;
  localparam int unsigned CLK_HZ    = 24_000_000;
  localparam int unsigned PACKET_HZ = 2_000;
  localparam int unsigned PERIOD    = CLK_HZ / PACKET_HZ;
  localparam int unsigned BLINK     = 4;

  logic clk = 1'b0;
  logic rst;
  logic led_blink, strobe;
  int checks = 0, failures = 0;
  longint cycle = 0;
  longint last_strobe = -1, last_toggle = -1;
  int strobes = 0, toggles = 0;
  logic led_q;

  always #10 clk = ~clk;

  data_clocker #(.CLK_HZ(CLK_HZ), .PACKET_HZ(PACKET_HZ), .BLINK_STROBES(BLINK)) dut (
    .clk(clk), .rst(rst), .led_blink(led_blink), .strobe(strobe));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (PERIOD * 40) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      cycle <= cycle + 1;
      if (strobe) begin
        if (last_strobe < 0)
          check(cycle == PERIOD, $sformatf("first strobe at %0d", cycle));
        else
          check(cycle - last_strobe == PERIOD, $sformatf("strobe period %0d", cycle - last_strobe));
        last_strobe <= cycle;
        strobes++;
      end
      if (led_blink != led_q) begin
        if (last_toggle >= 0)
          check(cycle - last_toggle == PERIOD * BLINK, $sformatf("blink period %0d", cycle - last_toggle));
        last_toggle <= cycle;
        toggles++;
      end
    end
    led_q <= led_blink;
  end

  initial begin
    rst = 1'b1;
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    repeat (PERIOD * 20 + 10) @(posedge clk);
    check(strobes == 20, $sformatf("20 strobes, saw %0d", strobes));
    check(toggles == 5, $sformatf("5 LED toggles, saw %0d", toggles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

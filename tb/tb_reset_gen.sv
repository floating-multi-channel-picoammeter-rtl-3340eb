// tb_reset_gen: checks that `rst` is high from power-up for exactly
// RESET_CYCLES + 1 rising edges' worth of clocks (the count plus the output
// register) and then stays low, for the default length and for a short one.
module tb_reset_gen;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic rst_d, rst_s;
  reset_gen u_def (.clk(clk), .rst(rst_d));
  reset_gen #(.RESET_CYCLES(5)) u_short (.clk(clk), .rst(rst_s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edges;
    for (edges = 0; edges < 300; edges++) begin
      #1;
      check(rst_d == (edges <= 64), $sformatf("default rst=%0b after %0d edges", rst_d, edges));
      check(rst_s == (edges <= 5), $sformatf("short rst=%0b after %0d edges", rst_s, edges));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fifo_mega: random reads and writes against a reference queue, on a
// 64-word FIFO so that it fills and empties often, followed by a pass on
// the default 16k-word size that fills it completely. Checks every word
// read, the one-clock read latency, empty/full/usedw, that a write to a
// full FIFO is dropped and that a read of an empty FIFO changes nothing.
module tb_fifo_mega;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Small instance.
  localparam int unsigned SD = 64;
  logic rst, rd_s, wr_s, empty_s, full_s;
  logic [15:0] d_s, q_s;
  logic [$clog2(SD):0] used_s;
  fifo_mega #(.WIDTH(16), .DEPTH(SD)) u_small (.clock(clk), .rst(rst), .rdreq(rd_s), .wrreq(wr_s),
    .data(d_s), .empty(empty_s), .full(full_s), .usedw(used_s), .q(q_s));

  // Default-size instance.
  localparam int unsigned LD = 16_384;
  logic rd_l, wr_l, empty_l, full_l;
  logic [15:0] d_l, q_l;
  logic [$clog2(LD):0] used_l;
  fifo_mega u_large (.clock(clk), .rst(rst), .rdreq(rd_l), .wrreq(wr_l),
    .data(d_l), .empty(empty_l), .full(full_l), .usedw(used_l), .q(q_l));

  logic [15:0] model [$];
  int drops = 0, fulls = 0, empties = 0;

  initial begin
    logic exp_valid, wr_full;
    int wp;
    logic [15:0] exp;
    rst = 1'b1; rd_s = 0; wr_s = 0; d_s = 0; rd_l = 0; wr_l = 0; d_l = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(empty_s && !full_s && used_s == 0, "small empty after reset");
    check(empty_l && !full_l && used_l == 0, "large empty after reset");

    exp_valid = 1'b0;
    for (int i = 0; i < 20_000; i++) begin
      // Phases bias towards filling or draining.
      wp = ((i / 500) % 2 == 0) ? 80 : 20;
      @(negedge clk);
      if (exp_valid) check(q_s == exp, $sformatf("read %h expected %h", q_s, exp));
      check(int'(used_s) == model.size(), $sformatf("usedw %0d expected %0d", used_s, model.size()));
      check(empty_s == (model.size() == 0) && full_s == (model.size() == SD), "flags");
      if (full_s) fulls++;
      if (empty_s) empties++;
      wr_s = ($urandom % 100) < wp;
      rd_s = ($urandom % 100) < (100 - wp);
      d_s  = 16'($urandom);
      exp_valid = 1'b0;
      // A write is refused when the FIFO is full before this clock, even if
      // a read frees a word in the same clock.
      wr_full = (model.size() == SD);
      if (rd_s && model.size() > 0) begin
        exp = model.pop_front();
        exp_valid = 1'b1;
      end
      if (wr_s) begin
        if (!wr_full) model.push_back(d_s);
        else drops++;
      end
    end
    check(drops > 0 && fulls > 0 && empties > 0, "full, empty and dropped writes all seen");

    // Fill the default-size FIFO to the top, then drain it.
    @(negedge clk);
    for (int i = 0; i < LD + 5; i++) begin
      wr_l = 1'b1;
      d_l  = 16'(i * 7 + 3);
      @(negedge clk);
    end
    wr_l = 1'b0;
    check(full_l && int'(used_l) == LD, $sformatf("large full, usedw %0d", used_l));
    for (int i = 0; i < LD; i++) begin
      rd_l = 1'b1;
      @(negedge clk);
      check(q_l == 16'(i * 7 + 3), $sformatf("large word %0d: %h", i, q_l));
    end
    rd_l = 1'b0;
    check(empty_l && used_l == 0, "large empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fifo_fx2ip: pushes random words through a 64-word fifo_mega and
// fifo_fx2ip into the FX2LP model while the host alternately reads and
// stalls. Checks that every word reaches the host once and in order, that
// no write hits a full endpoint, that SLWR strobes are three clocks apart
// when data and room are available, that `read` never fires while the
// endpoint is full, and that the endpoint did fill during the stalls.
module tb_fifo_fx2ip;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic rst;
  logic wr, rd, empty, full, flagb, slwr_n, host_ready;
  logic [15:0] d, q, fd;
  logic [6:0] used;
  longint cycle = 0;

  fifo_mega #(.WIDTH(16), .DEPTH(64)) u_fifo (.clock(clk), .rst(rst), .rdreq(rd), .wrreq(wr),
    .data(d), .empty(empty), .full(full), .usedw(used), .q(q));
  fifo_fx2ip dut (.clk(clk), .rst(rst), .empty(empty), .flags(flagb), .i_word(q),
    .read(rd), .write(slwr_n), .o_word(fd));
  fx2_slave_model #(.CAP(16), .DRAIN_CYCLES(2)) u_fx2 (.clk(clk), .slwr_n(slwr_n), .fd(fd),
    .host_ready(host_ready), .flagb(flagb));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SLWR spacing and read-while-full monitor.
  longint last_wr = -1;
  int spacing_bad = 0, spacing_ok = 0, read_when_full = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && rd && !flagb) read_when_full++;
    if (!rst && !slwr_n) begin
      if (last_wr >= 0 && cycle - last_wr < 3) spacing_bad++;
      if (last_wr >= 0 && cycle - last_wr == 3) spacing_ok++;
      last_wr <= cycle;
    end
  end

  logic [15:0] sent [$];

  initial begin
    int n;
    rst = 1'b1; wr = 1'b0; d = '0; host_ready = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(slwr_n == 1'b1, "SLWR high after reset");
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      host_ready = ((i / 300) % 3) != 1;  // stalls a third of the time
      wr = !full && (($urandom % 100) < 30);
      d  = 16'($urandom);
      if (wr) sent.push_back(d);
    end
    @(negedge clk) wr = 1'b0; host_ready = 1'b1;
    repeat (2000) @(negedge clk);
    n = u_fx2.host.size();
    check(n == sent.size(), $sformatf("host got %0d of %0d words", n, sent.size()));
    for (int i = 0; i < n && i < sent.size(); i++)
      check(u_fx2.host[i] == sent[i], $sformatf("word %0d: %h expected %h", i, u_fx2.host[i], sent[i]));
    check(u_fx2.overruns == 0, $sformatf("%0d endpoint overruns", u_fx2.overruns));
    check(spacing_bad == 0, "SLWR strobes at least 3 clocks apart");
    check(spacing_ok > 0, "back-to-back words 3 clocks apart seen");
    check(read_when_full == 0, "no FIFO read while endpoint full");
    check(u_fx2.full_edges > 0, "endpoint filled during host stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_packetizer: checks packets built from random channel values with the
// default 8 channels: the start word, every channel word in order, the XOR
// checksum, exactly N_CH + 2 writes on consecutive clocks starting one clock
// after `send`, that the values are those present at `send` even if the
// inputs change during the packet, and that a `send` during a packet is
// ignored.
module tb_packetizer;
  import pam_pkg::*;
  localparam int unsigned N_CH = 8;

  logic clk = 1'b0;
  logic rst, send, write;
  logic [15:0] i_word [N_CH];
  logic [15:0] fx_byte;
  int checks = 0, failures = 0;
  longint cycle = 0;

  logic [15:0] got [$];
  longint      got_t [$];

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (write) begin
      got.push_back(fx_byte);
      got_t.push_back(cycle);
    end
  end

  packetizer #(.N_CH(N_CH)) dut (.clk(clk), .rst(rst), .send(send), .i_word(i_word),
                                 .write(write), .fx_byte(fx_byte));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_packet(input bit extra_send);
    logic [15:0] exp [N_CH];
    logic [15:0] x;
    longint t_send;
    foreach (i_word[i]) begin
      i_word[i] = 16'($urandom);
      exp[i]    = i_word[i];
    end
    got.delete();
    got_t.delete();
    @(negedge clk);
    send = 1'b1;
    t_send = cycle;
    @(negedge clk);
    send = 1'b0;
    // Inputs change while the packet is written.
    foreach (i_word[i]) i_word[i] = ~i_word[i];
    if (extra_send) begin
      @(negedge clk);
      send = 1'b1;
      @(negedge clk);
      send = 1'b0;
    end
    repeat (N_CH + 10) @(negedge clk);
    check(got.size() == N_CH + 2, $sformatf("%0d words written", got.size()));
    if (got.size() == N_CH + 2) begin
      check(got[0] == PACKET_START_WORD, $sformatf("start word %h", got[0]));
      check(got_t[0] == t_send + 1, $sformatf("first write %0d clocks after send", got_t[0] - t_send));
      check(got_t[N_CH + 1] - got_t[0] == N_CH + 1, "writes on consecutive clocks");
      x = '0;
      for (int i = 0; i < N_CH; i++) begin
        check(got[i + 1] == exp[i], $sformatf("channel %0d: %h expected %h", i + 1, got[i + 1], exp[i]));
        x ^= exp[i];
      end
      check(got[N_CH + 1] == x, $sformatf("checksum %h expected %h", got[N_CH + 1], x));
    end
  endtask

  initial begin
    send = 1'b0;
    foreach (i_word[i]) i_word[i] = '0;
    rst = 1'b1;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (3) @(posedge clk);
    check(write == 1'b0, "no write after reset");
    for (int p = 0; p < 30; p++) one_packet(p % 5 == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

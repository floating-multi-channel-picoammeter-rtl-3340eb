// packetizer: builds one packet of all channel readings per send strobe.
//
// Packet layout (one 16-bit word per line), as published:
//   start word (pam_pkg::PACKET_START_WORD)
//   channel 1 value ... channel N_CH value
//   XOR checksum
// On `send` the module takes a snapshot of all i_word inputs, so a channel
// that updates while the packet is being written cannot tear it. From the
// next clock on it presents one word per clock on `fx_byte` with `write`
// high, N_CH + 2 words in all, straight into the FIFO's write port.
// The snapshot is a shift register that moves one word towards the output
// per clock. The checksum is the bitwise XOR of the N_CH channel words.
//
// From the document: the packet layout, 16-bit words, the XOR checksum and
// the port names. This design's own choices: the start word's value, which
// words the checksum covers (the channel words only) and the snapshot. A
// `send` that arrives while a packet is still being written is ignored; at
// 2 kHz and N_CH + 2 clocks per packet this cannot happen. Reset is
// synchronous and active high.
module packetizer
  import pam_pkg::*;
#(
  parameter int unsigned N_CH = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        send,
  input  logic [15:0] i_word [N_CH],
  output logic        write,
  output logic [15:0] fx_byte
);

  localparam int unsigned IW = $clog2(N_CH + 1);

  logic [15:0]   snap [N_CH];
  logic [15:0]   chk;
  logic [IW-1:0] idx;
  logic          busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      write   <= 1'b0;
      fx_byte <= '0;
      idx     <= '0;
      chk     <= '0;
    end else if (!busy) begin
      write <= 1'b0;
      if (send) begin
        snap    <= i_word;
        busy    <= 1'b1;
        write   <= 1'b1;
        fx_byte <= PACKET_START_WORD;
        idx     <= '0;
        chk     <= '0;
      end
    end else begin
      write <= 1'b1;
      if (idx < IW'(N_CH)) begin
        fx_byte <= snap[0];
        chk     <= chk ^ snap[0];
        idx     <= idx + 1'b1;
        for (int i = 0; i < int'(N_CH) - 1; i++) snap[i] <= snap[i + 1];
      end else begin
        fx_byte <= chk;
        busy    <= 1'b0;
      end
    end
  end

endmodule

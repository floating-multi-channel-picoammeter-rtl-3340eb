// fifo_fx2ip: moves buffered words into the Cypress FX2LP USB controller.
//
// The FX2LP works as a slave FIFO with a single bulk IN endpoint: the FPGA
// drives a 16-bit word on FD and pulls SLWR low for one interface clock to
// push it into the endpoint buffer, which the FX2LP then ships to the host.
// FLAGB from the FX2LP tells whether the endpoint can take more data. This
// module runs a three-state loop: IDLE asks the FIFO for a word (`read`)
// when the FIFO is not empty and `flags` says the endpoint has room; LOAD
// registers the FIFO's output on `o_word` and pulls `write` low; WRITE
// keeps the word stable while the FX2LP takes it and then releases `write`.
// One word therefore goes out every three clocks while data and room are
// available (16 Mbyte/s at a 24 MHz clock), and FLAGB is looked at again
// before every word.
//
// While `rst` is high `write` is held high, so no word is pushed into the
// FX2LP while the receiver starts up.
//
// Interface timing: `read` is combinational from `empty` and `flags` in the
// IDLE state and the FIFO answers one clock later. `write` is the SLWR pin
// level, active low like the FX2LP's default strobe polarity; `o_word` is
// the FD bus. `flags` is FLAGB, taken here as the endpoint-full flag with the
// FX2LP's default active-low polarity: 1 means there is room.
//
// From the document: slave FIFO mode, bulk IN endpoint, the port names. This
// design's own choices: the three-clock handshake, the flag polarity and the
// assumption that the FX2LP interface clock is the receiver's clock (the PLL
// output that feeds it is a copy of that clock). Reset is synchronous and
// active high.
module fifo_fx2ip (
  input  logic        clk,
  input  logic        rst,
  input  logic        empty,   // FIFO empty
  input  logic        flags,   // FX2LP FLAGB: 1 = endpoint has room
  input  logic [15:0] i_word,  // FIFO q, valid one clock after `read`
  output logic        read,    // FIFO rdreq
  output logic        write,   // SLWR pin, active low
  output logic [15:0] o_word   // FD[15:0]
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_WRITE} fx_state_t;

  fx_state_t state;
  logic      slwr_q;

  assign read = !rst && (state == S_IDLE) && !empty && flags;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      slwr_q <= 1'b1;
      o_word <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (read) state <= S_LOAD;
        S_LOAD: begin
          o_word <= i_word;
          slwr_q <= 1'b0;
          state  <= S_WRITE;
        end
        S_WRITE: begin
          slwr_q <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // SLWR is forced high while reset is asserted, so that nothing is pushed
  // into the FX2LP before the first clock edge has cleared slwr_q.
  assign write = slwr_q | rst;

  // SLWR is low for exactly one clock at a time.
  property p_slwr_single;
    @(posedge clk) disable iff (rst) !write |=> write;
  endproperty
  assert property (p_slwr_single) else $error("fifo_fx2ip: SLWR held low for two clocks");

endmodule

// reset_gen: power-up reset for the receiver.
//
// The receiver has no reset button; after the FPGA is configured this
// module holds `rst` high for RESET_CYCLES clocks and then releases it for
// good. It is a counter whose registers take their starting values from
// the configuration bitstream (declaration initialisers, which FPGA
// synthesis turns into power-up values), so it needs no reset itself.
//
// The document only names this block; the counter, its length and the
// active-high output are this design's own choices. `rst` is registered and
// changes on a rising clock edge.
module reset_gen #(
  parameter int unsigned RESET_CYCLES = 64
) (
  input  logic clk,
  output logic rst
);

  localparam int unsigned W = $clog2(RESET_CYCLES + 1);

  logic [W-1:0] cnt   = '0;
  logic         rst_q = 1'b1;

  always_ff @(posedge clk) begin
    if (cnt != W'(RESET_CYCLES)) begin
      cnt   <= cnt + 1'b1;
      rst_q <= 1'b1;
    end else begin
      rst_q <= 1'b0;
    end
  end

  assign rst = rst_q;

endmodule

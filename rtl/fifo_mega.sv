// fifo_mega: single-clock FIFO buffering packets for the USB link.
//
// DEPTH words of WIDTH bits (16k x 16 bits = 32 kbyte by default, the size
// the document gives) decouple the steady 2 kHz packet stream from the USB
// host, which may stop reading for a while when it is busy. It is a RAM
// array with a write pointer, a read pointer and a word count. A write
// (`wrreq`) is accepted unless the FIFO is full; a read (`rdreq`) is accepted
// unless it is empty, and its word appears on `q` on the next clock (q is
// registered, as in a block-RAM FIFO without show-ahead). A write to a full
// FIFO is dropped. `empty`, `full` and `usedw` reflect the count after the
// last clock edge.
//
// From the document: the 16 kWord size, 16-bit words and the
// clock/rdreq/wrreq/data/empty/q ports. This design's own choices: the
// read latency, the full/usedw outputs, dropping writes when full and the
// synchronous active-high reset of the pointers (the RAM is not cleared).
module fifo_mega #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16_384
) (
  input  logic                     clock,
  input  logic                     rst,
  input  logic                     rdreq,
  input  logic                     wrreq,
  input  logic [WIDTH-1:0]         data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   usedw,
  output logic [WIDTH-1:0]         q
);

  localparam int unsigned AW = $clog2(DEPTH);

  initial begin
    assert (DEPTH == (1 << AW)) else $error("fifo_mega: DEPTH must be a power of two");
  end

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      count;
  logic             wr_ok, rd_ok;

  assign wr_ok = wrreq && (count != (AW + 1)'(DEPTH));
  assign rd_ok = rdreq && (count != '0);

  always_ff @(posedge clock) begin
    if (wr_ok) mem[wp] <= data;
    if (rd_ok) q <= mem[rp];
  end

  always_ff @(posedge clock) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (wr_ok) wp <= wp + 1'b1;
      if (rd_ok) rp <= rp + 1'b1;
      count <= count + (AW + 1)'(wr_ok) - (AW + 1)'(rd_ok);
    end
  end

  assign empty = (count == '0);
  assign full  = (count == (AW + 1)'(DEPTH));
  assign usedw = count;

endmodule

// sync_fifo: single-clock first-in first-out queue with show-ahead output.
//
// Used for the send queue, the receive queue, the multimedia FIFOs and the
// internal packet and tag buffers.  The head entry is visible on rd_data while
// empty is low; rd_en pops it.  A write while full is taken only if the same
// clock pops; otherwise it is ignored, as is a read while empty (both flagged
// by assertions).  count gives the fill level.  Both
// pointers and the count reset to zero; the storage itself is not reset.
// Depth must be a power of two.  Storage is a plain array so that synthesis
// can map it onto RAM.
//
// A generic building block; nothing in it is specific to the adapter.
//
// The assertions are checked on the clock only while rst_n is high; that
// clocked read of the asynchronous reset is for checking only and adds no
// logic, though lint tools report it as a mixed synchronous/asynchronous use.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == DEPTH[AW:0]);
  assign do_wr = wr_en && (!full || rd_en);
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) a_no_overflow: assert (!(wr_en && full && !rd_en));
  end
  always_ff @(posedge clk) begin
    if (rst_n) a_no_underflow: assert (!(rd_en && empty));
  end
endmodule

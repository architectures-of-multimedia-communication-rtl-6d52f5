// lwma_host_queues: buffer-pointer queues of the light-weight multimedia
// adapter's host interface, for one of its two memories (transmit or receive).
//
// Function: the memory is divided into NBUF equal buffers.  A free-buffer
// queue holds the numbers of unused buffers.  Each of NCONN active multimedia
// connections has a queue of its own that carries the numbers of filled
// buffers from producer to consumer.  On the transmit memory the producer is
// the application (it takes a free buffer, fills it and pushes its number on
// the connection's send queue) and the consumer is the coder/DMA side; on the
// receive memory the decoder takes a free buffer, fills it and pushes its
// number on the connection's receive queue, and the application consumes it.
// The consumer hands each number back to the free queue once the buffer is
// empty again.  Instantiate the block once per memory.
//
// How: a free_queue (refills itself with 0..NBUF-1 after reset, NBUF clocks)
// and NCONN sync_fifo queues of buffer numbers, each NBUF deep so that no
// connection queue can overflow while every buffer number exists only once.
//
// Interface and timing: all ports are single-cycle strobes on one clock.
//   fb_valid/fb_buf show the next free buffer (show-ahead); fb_get takes it.
//   fb_put/fb_put_buf return a buffer; get and put may share a clock.
//   push[c]/push_buf[c] append to connection c's queue (full[c] when full).
//   head_valid[c]/head_buf[c] show its oldest entry; pop[c] removes it;
//   qcount[c] is its fill level.
// Results appear the clock after the strobe.  Connection queues are
// independent, so several may be pushed and popped in the same clock.
//
// From the document: free buffer queue, per-connection send and receive
// queues implemented with FIFOs that control access to the memory, one set
// per direction.  This design's choices: the numbers NBUF and NCONN, queue
// depth, buffer numbers instead of addresses, and show-ahead outputs.
module lwma_host_queues #(
  parameter int unsigned NBUF  = 16,
  parameter int unsigned NCONN = 4
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // free-buffer queue
  output logic                               fb_valid,
  output logic [$clog2(NBUF)-1:0]            fb_buf,
  input  logic                               fb_get,
  input  logic                               fb_put,
  input  logic [$clog2(NBUF)-1:0]            fb_put_buf,
  output logic [$clog2(NBUF):0]              fb_count,
  // per-connection queues
  input  logic [NCONN-1:0]                   push,
  input  logic [NCONN-1:0][$clog2(NBUF)-1:0] push_buf,
  output logic [NCONN-1:0]                   full,
  output logic [NCONN-1:0]                   head_valid,
  output logic [NCONN-1:0][$clog2(NBUF)-1:0] head_buf,
  input  logic [NCONN-1:0]                   pop,
  output logic [NCONN-1:0][$clog2(NBUF):0]   qcount
);
  localparam int unsigned BW = $clog2(NBUF);

  free_queue #(.N(NBUF)) u_free (
    .clk, .rst_n,
    .alloc_valid (fb_valid),
    .alloc_slot  (fb_buf),
    .alloc_pop   (fb_get),
    .release_en  (fb_put),
    .release_slot(fb_put_buf),
    .free_count  (fb_count)
  );

  for (genvar c = 0; c < NCONN; c++) begin : g_conn
    logic          empty;
    sync_fifo #(.WIDTH(BW), .DEPTH(NBUF)) u_q (
      .clk, .rst_n,
      .wr_en  (push[c]),
      .wr_data(push_buf[c]),
      .rd_en  (pop[c]),
      .rd_data(head_buf[c]),
      .empty  (empty),
      .full   (full[c]),
      .count  (qcount[c])
    );
    assign head_valid[c] = !empty;
  end
endmodule

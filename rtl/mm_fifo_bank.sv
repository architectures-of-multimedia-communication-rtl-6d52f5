// mm_fifo_bank: the multimedia FIFOs, one per active isochronous connection.
//
// NUM independent byte FIFOs of DEPTH bytes.  On the receive side the DMA
// unit writes the data part of isochronous packets into the FIFO of the
// connection and the multimedia bus or device reads it; on the transmit side
// the multimedia device writes and the DMA unit reads.  A separate FIFO per
// connection keeps one stream from queueing behind another.  Each FIFO is
// show-ahead (rd_data valid while empty is low).  Overflow handling is left
// to the writer: the receive DMA drops bytes for a full FIFO.
//
// From the architecture: one multimedia FIFO per active isochronous
// connection, between the DMA unit and the multimedia bus. This design's
// choices: four FIFOs of 2048 bytes each.
module mm_fifo_bank #(
  parameter int unsigned NUM   = mpa_pkg::NUM_MMF,
  parameter int unsigned DEPTH = mpa_pkg::MMF_DEPTH
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NUM-1:0]              wr_en,
  input  logic [NUM-1:0][7:0]         wr_data,
  output logic [NUM-1:0]              full,
  input  logic [NUM-1:0]              rd_en,
  output logic [NUM-1:0][7:0]         rd_data,
  output logic [NUM-1:0]              empty,
  output logic [NUM-1:0][$clog2(DEPTH):0] count
);
  for (genvar i = 0; i < NUM; i++) begin : g_fifo
    sync_fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en  (wr_en[i]),
      .wr_data(wr_data[i]),
      .rd_en  (rd_en[i]),
      .rd_data(rd_data[i]),
      .empty  (empty[i]),
      .full   (full[i]),
      .count  (count[i])
    );
  end
endmodule

// free_queue: queue of free buffer numbers.
//
// After reset it holds every buffer number 0..N-1 in order, so a consumer can
// take a buffer at once.  A user of a buffer pops its number (alloc), and the
// owner pushes the number back (release) when the buffer may be reused.  The
// queue can hold all N numbers, so a correct release never finds it full.
// Pop and push may happen in the same cycle.  Show-ahead: alloc_slot is valid
// while alloc_valid is high.  Reset refills the queue over N cycles; during
// that time alloc_valid is low.
//
// From the architecture: buffers are handed out from a free queue and
// returned by their user. This design's choices: buffer numbers instead of
// addresses and the self-filling reset.
module free_queue #(
  parameter int unsigned N = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 alloc_valid,
  output logic [$clog2(N)-1:0] alloc_slot,
  input  logic                 alloc_pop,
  input  logic                 release_en,
  input  logic [$clog2(N)-1:0] release_slot,
  output logic [$clog2(N):0]   free_count
);
  localparam int unsigned SW = $clog2(N);

  logic          init_busy;
  logic [SW:0]   init_cnt;
  logic          q_empty, q_full;
  logic          wr_en;
  logic [SW-1:0] wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_cnt  <= '0;
    end else if (init_busy) begin
      init_cnt <= init_cnt + 1'b1;
      if (init_cnt == (SW+1)'(N - 1)) init_busy <= 1'b0;
    end
  end

  assign wr_en   = init_busy ? 1'b1 : release_en;
  assign wr_data = init_busy ? init_cnt[SW-1:0] : release_slot;

  sync_fifo #(.WIDTH(SW), .DEPTH(N)) u_q (
    .clk, .rst_n,
    .wr_en, .wr_data,
    .rd_en  (alloc_pop && !init_busy),
    .rd_data(alloc_slot),
    .empty  (q_empty),
    .full   (q_full),
    .count  (free_count)
  );

  assign alloc_valid = !q_empty && !init_busy;
endmodule

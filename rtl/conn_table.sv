// conn_table: connection control information, indexed by connection number.
//
// The CN found by the protocol filter is a pointer into this table; the
// check-sequence generators and the DMA units read the entry to learn how a
// packet of that connection is handled (see conn_info_t in mpa_pkg).  The
// protocol processor writes entries through the write port, one per clock.
// NRD read ports are combinational (asynchronous read), so a pipeline stage
// can look up the entry of the packet in the cycle its first byte arrives.
// After reset every entry reads as invalid (the valid bits are reset; the
// rest is not).
//
// From the architecture: the CN is used by every later pipeline stage to find
// how the packet is to be handled. This design's choices: a table indexed
// directly by the CN, its fields, and combinational read ports.
module conn_table
  import mpa_pkg::*;
#(
  parameter int unsigned NRD = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  cn_t                      wr_cn,
  input  conn_info_t               wr_info,
  input  cn_t        [NRD-1:0]     rd_cn,
  output conn_info_t [NRD-1:0]     rd_info
);
  localparam int unsigned ENTRIES = 1 << CN_W;

  conn_info_t          tab [ENTRIES];
  logic [ENTRIES-1:0]  vld;

  always_ff @(posedge clk) begin
    if (wr_en) tab[wr_cn] <= wr_info;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else if (wr_en) vld[wr_cn] <= wr_info.valid;
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) begin
      rd_info[r]       = tab[rd_cn[r]];
      rd_info[r].valid = vld[rd_cn[r]];
    end
  end
endmodule

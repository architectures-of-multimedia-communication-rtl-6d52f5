// cam: content addressable memory at the centre of the protocol filter.
//
// Each of the DEPTH rows holds a valid bit and a key {tree level, protocol
// type, address information}.  A search compares the key on srch_key with all
// valid rows in one cycle; one clock later srch_hit and srch_addr give the
// result, srch_addr being the lowest matching row.  The protocol processor
// loads rows through the write port (wr_en, wr_addr, wr_valid, wr_key); a
// write takes effect for searches from the next cycle on.  All rows are
// invalid after reset.  The matched-row address is what the connection
// number builder concatenates into the connection number.
//
// From the architecture: a CAM holds the known protocol addresses and returns
// the address of the matching word, which becomes part of the connection
// number. This design's choices: 16 rows, a 42-bit key {level, type,
// address}, lowest-row priority and one clock of latency.
module cam
  import mpa_pkg::*;
#(
  parameter int unsigned DEPTH = CAM_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // write port
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic                     wr_valid,
  input  cam_key_t                 wr_key,
  // search port
  input  logic                     srch_en,
  input  cam_key_t                 srch_key,
  output logic                     srch_done,
  output logic                     srch_hit,
  output logic [$clog2(DEPTH)-1:0] srch_addr
);
  localparam int unsigned AW = $clog2(DEPTH);

  cam_key_t         keys  [DEPTH];
  logic [DEPTH-1:0] valid;
  logic [DEPTH-1:0] match;
  logic [AW-1:0]    enc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else if (wr_en) valid[wr_addr] <= wr_valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en) keys[wr_addr] <= wr_key;
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++) match[i] = valid[i] && (keys[i] == srch_key);
  end

  // priority encoder: lowest matching row
  always_comb begin
    enc = '0;
    for (int i = DEPTH - 1; i >= 0; i--) if (match[i]) enc = AW'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      srch_done <= 1'b0;
      srch_hit  <= 1'b0;
      srch_addr <= '0;
    end else begin
      srch_done <= srch_en;
      srch_hit  <= srch_en && (match != '0);
      srch_addr <= enc;
    end
  end
endmodule

// pf_cn_builder: connection number builder of the protocol filter.
//
// A state machine that collects, for each tree level searched by the mask
// generator, the address of the CAM row that matched, and concatenates them
// into the connection number: CN = {addr(level 2), addr(level 1),
// addr(level 0)}, a level not on the packet's path contributing zero.  A
// connection is known only if every level of its path matched.  The request
// flags (level, last, abort, protocol) are delayed by one clock to line up
// with the CAM result.  When the result for the last request of a packet
// arrives, res_valid pulses for one clock with the CN, the known flag and the
// protocol type (PROTO_UNKNOWN for an unknown connection).
//
// From the architecture: the CN is made by concatenating the CAM addresses
// found at each level of the protocol tree, and packets whose path is not
// found are of an unknown connection. This design's choices: the timing and
// the zero fields for levels not on the path.
module pf_cn_builder
  import mpa_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // request as issued to the CAM (same cycle)
  input  logic               req_valid,
  input  logic [1:0]         req_level,
  input  logic               req_last,
  input  logic               req_abort,
  input  proto_e             req_proto,
  // CAM result, one clock later
  input  logic               cam_hit,
  input  logic [CAM_AW-1:0]  cam_addr,
  // connection number
  output logic               res_valid,
  output pkt_tag_t           res_tag
);
  logic       d_valid, d_last, d_abort;
  logic [1:0] d_level;
  proto_e     d_proto;

  logic [LEVELS-1:0][CAM_AW-1:0] addrs;   // addresses collected so far
  logic                          all_hit; // every level so far matched

  logic [LEVELS-1:0][CAM_AW-1:0] addrs_nx;
  logic                          hit_nx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0;
      d_level <= '0;
      d_last  <= 1'b0;
      d_abort <= 1'b0;
      d_proto <= PROTO_UNKNOWN;
    end else begin
      d_valid <= req_valid;
      d_level <= req_level;
      d_last  <= req_last;
      d_abort <= req_abort;
      d_proto <= req_proto;
    end
  end

  always_comb begin
    // a level-0 result starts a new packet
    addrs_nx = (d_level == 2'd0) ? '0 : addrs;
    hit_nx   = (d_level == 2'd0) ? 1'b1 : all_hit;
    if (d_abort) begin
      hit_nx = 1'b0;
    end else begin
      addrs_nx[d_level] = cam_addr;
      hit_nx            = hit_nx && cam_hit;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addrs     <= '0;
      all_hit   <= 1'b0;
      res_valid <= 1'b0;
      res_tag   <= '0;
    end else begin
      res_valid <= d_valid && d_last;
      if (d_valid) begin
        addrs   <= addrs_nx;
        all_hit <= hit_nx;
        if (d_last) begin
          res_tag.cn    <= hit_nx ? cn_t'(addrs_nx) : '0;
          res_tag.known <= hit_nx;
          res_tag.proto <= hit_nx ? d_proto : PROTO_UNKNOWN;
        end
      end
    end
  end
endmodule

// protocol_filter: the protocol filter (PF) of the receive pipeline.
//
// It scans the header of each incoming packet, finds the connection the
// packet belongs to and hands the packet on together with a tag holding the
// connection number (CN), a known flag and the protocol type.  Inside, the
// mask generator (pf_mask_gen) turns header fields into CAM search masks, the
// CAM (cam) holds the paths of the protocol address tree, one row per branch,
// and the CN builder (pf_cn_builder) concatenates the matched row addresses
// into the CN.  Detection takes a fixed number of cycles after the last header
// field, so the filter keeps up with one byte per clock.
//
// Because the CN is only known once the header has been seen, packet bytes
// wait in a packet buffer (PKT_DEPTH bytes) and tags in a tag queue of the
// same depth; a packet leaves the filter only when its tag is ready.  PKT_DEPTH
// must exceed the longest header that is searched (64 bytes for IP with
// options plus the port fields) so the buffer cannot fill before the tag
// exists.  Input and output are byte streams with valid/ready handshakes
// (sop marks the first byte, eop the last); out_tag is stable for the whole
// packet.  The CAM rows are written by the protocol processor.
//
// From the architecture: the protocol filter parses the headers of incoming
// packets at network speed and returns, for a known connection, the protocol
// type and the CN. This design's choices: holding the packet in a buffer
// until its CN is known, and the tag format.
//
// The assertions are checked on the clock only while rst_n is high; that
// clocked read of the asynchronous reset is for checking only and adds no
// logic, though lint tools report it as a mixed synchronous/asynchronous use.
module protocol_filter
  import mpa_pkg::*;
#(
  parameter int unsigned PKT_DEPTH = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  // frames from the network access unit
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [7:0]        in_data,
  input  logic              in_sop,
  input  logic              in_eop,
  // tagged packets to the check-sequence generator
  output logic              out_valid,
  input  logic              out_ready,
  output logic [7:0]        out_data,
  output logic              out_sop,
  output logic              out_eop,
  output pkt_tag_t          out_tag,
  // CAM loading by the protocol processor
  input  logic              cam_wr_en,
  input  logic [CAM_AW-1:0] cam_wr_addr,
  input  logic              cam_wr_valid,
  input  cam_key_t          cam_wr_key
);
  localparam int unsigned CW = $clog2(PKT_DEPTH);

  logic       in_fire;
  logic       pb_empty, pb_full;
  logic [9:0] pb_q;
  logic       tq_empty, tq_full;
  logic [CW:0] pb_count, tq_count;

  logic       req_valid, req_last, req_abort;
  cam_key_t   req_key;
  proto_e     req_proto;
  logic       cam_done, cam_hit;
  logic [CAM_AW-1:0] cam_addr;
  logic       res_valid;
  pkt_tag_t   res_tag;
  logic       out_fire;

  assign in_ready = !pb_full;
  assign in_fire  = in_valid && in_ready;

  pf_mask_gen u_mask (
    .clk, .rst_n,
    .in_fire, .in_data, .in_sop, .in_eop,
    .req_valid, .req_key, .req_last, .req_abort, .req_proto
  );

  cam #(.DEPTH(CAM_DEPTH)) u_cam (
    .clk, .rst_n,
    .wr_en   (cam_wr_en),
    .wr_addr (cam_wr_addr),
    .wr_valid(cam_wr_valid),
    .wr_key  (cam_wr_key),
    .srch_en (req_valid && !req_abort),
    .srch_key(req_key),
    .srch_done(cam_done),
    .srch_hit (cam_hit),
    .srch_addr(cam_addr)
  );

  pf_cn_builder u_cnb (
    .clk, .rst_n,
    .req_valid, .req_level(req_key.level), .req_last, .req_abort, .req_proto,
    .cam_hit, .cam_addr,
    .res_valid, .res_tag
  );

  // packet buffer: {sop, eop, byte}
  sync_fifo #(.WIDTH(10), .DEPTH(PKT_DEPTH)) u_pktbuf (
    .clk, .rst_n,
    .wr_en  (in_fire),
    .wr_data({in_sop, in_eop, in_data}),
    .rd_en  (out_fire),
    .rd_data(pb_q),
    .empty  (pb_empty),
    .full   (pb_full),
    .count  (pb_count)
  );

  // tag queue: one entry per packet, popped with the packet's last byte.
  // Every queued tag belongs to a packet with at least one byte still in the
  // packet buffer, so this queue cannot overflow.
  sync_fifo #(.WIDTH($bits(pkt_tag_t)), .DEPTH(PKT_DEPTH)) u_tagq (
    .clk, .rst_n,
    .wr_en  (res_valid),
    .wr_data(res_tag),
    .rd_en  (out_fire && out_eop),
    .rd_data(out_tag),
    .empty  (tq_empty),
    .full   (tq_full),
    .count  (tq_count)
  );

  assign out_valid = !pb_empty && !tq_empty;
  assign out_fire  = out_valid && out_ready;
  assign {out_sop, out_eop, out_data} = pb_q;

  always_ff @(posedge clk) begin
    if (rst_n) a_tag_never_full: assert (!(res_valid && tq_full));
  end
endmodule

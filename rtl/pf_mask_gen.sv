// pf_mask_gen: mask generator of the protocol filter.
//
// A state machine that watches the bytes of each incoming packet as they are
// accepted (in_fire), pulls out the header fields that identify a connection
// and presents them, one tree level at a time, as a search mask for the CAM.
// The protocol address tree (Internet protocols) has these levels:
//   level 0  network protocol:  ptype = IP version (4 = IP, 5 = ST-II), addr 0
//   level 1  IP:    ptype = IP protocol number, addr = IP source address
//            ST-II: ptype = 5, addr = hop identifier (HID, bytes 4..5)
//   level 2  TCP/UDP: ptype = IP protocol, addr = {source port, dest port}
// The IP header length comes from the IHL field, so IP options are skipped.
// Exactly one request per packet has last set: the one for the final level
// of the packet's path, or, if the packet ends or its version is not known
// before that, an abort request (abort = 1, key invalid) that makes the CN
// builder report an unknown connection.  Every request carries the protocol
// type of the packet as far as it is known.  Requests are issued in the cycle
// the byte completing the field is accepted; there is no other latency.
//
// From the architecture: a mask generator walks the protocol address tree,
// extracting the relevant address field of each level and presenting it to
// the CAM. This design's choices: the field positions for IPv4, TCP/UDP and
// ST-II, the key layout and abort on short packets.
module pf_mask_gen
  import mpa_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_fire,    // a byte of the packet is accepted this cycle
  input  logic [7:0] in_data,
  input  logic      in_sop,
  input  logic      in_eop,
  output logic      req_valid,
  output cam_key_t  req_key,
  output logic      req_last,
  output logic      req_abort,
  output proto_e    req_proto
);
  typedef enum logic [1:0] {S_HDR, S_DONE} state_e;

  state_e           state;
  logic [LEN_W-1:0] idx;        // offset of the current byte in the packet
  logic [3:0]       ver, ihl;
  logic [7:0]       ipproto;
  logic [31:0]      srcaddr;
  logic [15:0]      hid;
  logic [15:0]      sport;
  logic [7:0]       dport_hi;

  // Current byte's offset and the fields as they are known including it.
  logic [LEN_W-1:0] cur_idx;
  logic [3:0]       cur_ver, cur_ihl;
  logic [LEN_W-1:0] l4;          // offset of the transport header
  logic             active;
  proto_e           proto_now;

  assign cur_idx = in_sop ? '0 : idx;
  assign cur_ver = in_sop ? in_data[7:4] : ver;
  assign cur_ihl = in_sop ? in_data[3:0] : ihl;
  assign l4      = LEN_W'({cur_ihl, 2'b00});
  assign active  = in_fire && (in_sop || state == S_HDR);

  always_comb begin
    if (cur_ver == VER_ST2) proto_now = PROTO_ST2;
    else if (cur_ver == VER_IP && cur_idx > 9 && ipproto == IPPROTO_TCP) proto_now = PROTO_TCP;
    else if (cur_ver == VER_IP && cur_idx > 9 && ipproto == IPPROTO_UDP) proto_now = PROTO_UDP;
    else proto_now = PROTO_UNKNOWN;
  end

  always_comb begin
    req_valid = 1'b0;
    req_key   = '0;
    req_last  = 1'b0;
    req_abort = 1'b0;
    req_proto = proto_now;
    if (active) begin
      if (cur_idx == 0) begin
        req_valid     = 1'b1;
        req_key.level = 2'd0;
        req_key.ptype = {4'h0, cur_ver};
        // unknown network protocol: this level is the last one
        req_last      = !(cur_ver == VER_IP || cur_ver == VER_ST2);
      end else if (cur_ver == VER_ST2 && cur_idx == 5) begin
        req_valid     = 1'b1;
        req_key.level = 2'd1;
        req_key.ptype = {4'h0, VER_ST2};
        req_key.addr  = {16'h0, hid[7:0], in_data};
        req_last      = 1'b1;
      end else if (cur_ver == VER_IP && cur_idx == 15) begin
        req_valid     = 1'b1;
        req_key.level = 2'd1;
        req_key.ptype = ipproto;
        req_key.addr  = {srcaddr[23:0], in_data};
        req_last      = !(ipproto == IPPROTO_TCP || ipproto == IPPROTO_UDP);
      end else if (cur_ver == VER_IP && cur_idx == l4 + 3 && cur_idx > 15) begin
        req_valid     = 1'b1;
        req_key.level = 2'd2;
        req_key.ptype = ipproto;
        req_key.addr  = {sport, dport_hi, in_data};
        req_last      = 1'b1;
      end
      // packet ends before its path is complete
      if (in_eop && !req_last) begin
        req_valid = 1'b1;
        req_last  = 1'b1;
        req_abort = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_DONE;
      idx      <= '0;
      ver      <= '0;
      ihl      <= '0;
      ipproto  <= '0;
      srcaddr  <= '0;
      hid      <= '0;
      sport    <= '0;
      dport_hi <= '0;
    end else if (in_fire) begin
      idx <= cur_idx + 1'b1;
      if (in_sop) begin
        ver   <= in_data[7:4];
        ihl   <= in_data[3:0];
        state <= S_HDR;
      end
      if (active) begin
        if (cur_idx == 9) ipproto <= in_data;
        if (cur_idx >= 12 && cur_idx <= 15) srcaddr <= {srcaddr[23:0], in_data};
        if (cur_idx == 4 || cur_idx == 5)   hid     <= {hid[7:0], in_data};
        if (cur_idx == l4)                  sport[15:8] <= in_data;
        if (cur_idx == l4 + 1)              sport[7:0]  <= in_data;
        if (cur_idx == l4 + 2)              dport_hi    <= in_data;
        if (req_valid && req_last)          state <= S_DONE;
      end
      if (in_eop) state <= S_DONE;
    end
  end
endmodule

// check_gen: receive-side checksum/CRC generator (CG).
//
// It passes the tagged packet stream through one register stage and computes,
// on the fly, the check sequence that the connection table prescribes for the
// packet's connection: a 16-bit one's-complement sum (TCP/IP) or a CRC-32
// (MSB first, initial value all ones).  The check covers the bytes from the
// entry's chk_start offset to the end of the packet, so a good packet gives a
// folded sum of FFFF or the CRC-32 residue C704DD7B.  Packets of unknown
// connections, or connections without a check, get value 0 and ok = 1.
// The result (out_chk, out_chk_ok) is valid on the packet's last byte.
// The connection entry is read through a combinational table port (ct_cn /
// ct_info) on the first byte and held for the packet.  Throughput is one byte
// per clock; latency one clock.
//
// From the architecture: a checksum/CRC unit in the receive pipeline, after
// the protocol filter, computes the check sequence the connection uses,
// chosen by the CN. This design's choices: the two algorithms (Internet
// checksum, CRC-32), the start offset per connection and the single register
// stage.
module check_gen
  import mpa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_data,
  input  logic        in_sop,
  input  logic        in_eop,
  input  pkt_tag_t    in_tag,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  output logic        out_sop,
  output logic        out_eop,
  output pkt_tag_t    out_tag,
  output logic [31:0] out_chk,
  output logic        out_chk_ok,
  // connection table read port
  output cn_t         ct_cn,
  input  conn_info_t  ct_info
);
  logic             in_fire;
  chk_alg_e         alg_q, alg_cur;
  logic [OFF_W-1:0] start_q, start_cur;
  logic [LEN_W-1:0] idx;
  logic [LEN_W-1:0] cur_idx;
  logic [31:0]      acc, acc_cur, acc_nx;
  logic [31:0]      res_nx;
  logic             ok_nx;

  assign ct_cn    = in_tag.cn;
  assign in_ready = !out_valid || out_ready;
  assign in_fire  = in_valid && in_ready;

  always_comb begin
    if (in_sop) begin
      alg_cur   = (in_tag.known && ct_info.valid) ? ct_info.alg : CHK_NONE;
      start_cur = ct_info.chk_start;
      acc_cur   = (alg_cur == CHK_CRC32) ? 32'hFFFF_FFFF : 32'h0;
      cur_idx   = '0;
    end else begin
      alg_cur   = alg_q;
      start_cur = start_q;
      acc_cur   = acc;
      cur_idx   = idx;
    end
    acc_nx = acc_cur;
    if (cur_idx >= LEN_W'(start_cur)) begin
      unique case (alg_cur)
        CHK_INET16: acc_nx = inet_add(acc_cur, in_data, cur_idx[0] ^ start_cur[0]);
        CHK_CRC32:  acc_nx = crc32_byte(acc_cur, in_data);
        default:    acc_nx = acc_cur;
      endcase
    end
    unique case (alg_cur)
      CHK_INET16: begin res_nx = {16'h0, inet_fold(acc_nx)}; ok_nx = (inet_fold(acc_nx) == 16'hFFFF); end
      CHK_CRC32:  begin res_nx = acc_nx; ok_nx = (acc_nx == CRC32_RESIDUE); end
      default:    begin res_nx = 32'h0;  ok_nx = 1'b1; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_sop    <= 1'b0;
      out_eop    <= 1'b0;
      out_tag    <= '0;
      out_chk    <= '0;
      out_chk_ok <= 1'b0;
      alg_q      <= CHK_NONE;
      start_q    <= '0;
      acc        <= '0;
      idx        <= '0;
    end else begin
      if (in_ready) out_valid <= in_valid;
      if (in_fire) begin
        out_data   <= in_data;
        out_sop    <= in_sop;
        out_eop    <= in_eop;
        out_tag    <= in_tag;
        out_chk    <= res_nx;
        out_chk_ok <= ok_nx;
        alg_q      <= alg_cur;
        start_q    <= start_cur;
        acc        <= acc_nx;
        idx        <= cur_idx + 1'b1;
      end
    end
  end
endmodule

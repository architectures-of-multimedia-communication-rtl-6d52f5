// tx_check_insert: transmit-side checksum/CRC generator (CG).
//
// The check sequence of an outgoing packet is computed on the fly while the
// transmit DMA moves the packet towards the network access unit, and the CN
// of the packet decides which check sequence is used and where in the packet
// it is stored.  Since a check field usually sits in the header, ahead of the
// data it covers, the packet is collected in a frame buffer of FRAME_BUF
// bytes while the check is computed, and the check is inserted as the frame
// is read out.
//  * CHK_INET16: one's-complement sum over bytes chk_start..end (the check
//    field itself must hold zero); the complement of the sum is inserted as
//    two bytes, most significant first, at chk_off.
//  * CHK_CRC32: CRC-32 over bytes chk_start..chk_off-1; its complement is
//    inserted as four bytes, most significant first, at chk_off (normally a
//    trailer whose four placeholder bytes end the packet).
//  * CHK_NONE, or an invalid table entry: the packet passes unchanged.
// The unit alternates between filling (one byte per clock in) and sending (one
// byte per clock out); a packet of n bytes therefore occupies it for 2n
// clocks, which the adapter clock must allow for.  The frame buffer is read
// combinationally during sending.  The connection entry is read through a
// combinational table port on the first byte.  A frame longer than the
// buffer is sent cut to BUF_BYTES bytes (its end is lost).
//
// From the architecture: on the transmit side the check sequence is computed
// on the fly as the packet goes to the network access unit. This design's
// choice: the frame is stored first so the check can be inserted at any
// offset, which costs a second pass over the frame.
module tx_check_insert
  import mpa_pkg::*;
#(
  parameter int unsigned BUF_BYTES = FRAME_BUF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_data,
  input  logic        in_sop,
  input  logic        in_eop,
  input  cn_t         in_cn,
  // connection table read port
  output cn_t         ct_cn,
  input  conn_info_t  ct_info,
  // frames to the network access unit
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  output logic        out_sop,
  output logic        out_eop
);
  localparam int unsigned AW = $clog2(BUF_BYTES);

  typedef enum logic {S_FILL, S_SEND} state_e;

  state_e           state;
  logic [7:0]       fbuf [BUF_BYTES];
  logic [AW:0]      widx, ridx, len;
  chk_alg_e         alg_q, alg_cur;
  logic [OFF_W-1:0] start_q, start_cur, off_q, off_cur;
  logic [31:0]      acc, acc_cur, acc_nx;
  logic [31:0]      ins;           // value to insert, left-aligned
  logic [2:0]       ins_n;         // bytes to insert
  logic [OFF_W-1:0] cur_idx;
  logic             in_fire, out_fire;
  logic [AW:0]      rel;

  assign ct_cn    = in_cn;
  assign in_ready = (state == S_FILL);
  assign in_fire  = in_valid && in_ready;

  always_comb begin
    if (in_sop) begin
      alg_cur   = ct_info.valid ? ct_info.alg : CHK_NONE;
      start_cur = ct_info.chk_start;
      off_cur   = ct_info.chk_off;
      acc_cur   = (alg_cur == CHK_CRC32) ? 32'hFFFF_FFFF : 32'h0;
      cur_idx   = '0;
    end else begin
      alg_cur   = alg_q;
      start_cur = start_q;
      off_cur   = off_q;
      acc_cur   = acc;
      cur_idx   = OFF_W'(widx);
    end
    acc_nx = acc_cur;
    unique case (alg_cur)
      CHK_INET16: if (cur_idx >= start_cur)
                    acc_nx = inet_add(acc_cur, in_data, cur_idx[0] ^ start_cur[0]);
      CHK_CRC32:  if (cur_idx >= start_cur && cur_idx < off_cur)
                    acc_nx = crc32_byte(acc_cur, in_data);
      default:    acc_nx = acc_cur;
    endcase
  end

  always_ff @(posedge clk) begin
    if (in_fire && widx < (AW+1)'(BUF_BYTES)) fbuf[widx[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_FILL;
      widx    <= '0;
      ridx    <= '0;
      len     <= '0;
      alg_q   <= CHK_NONE;
      start_q <= '0;
      off_q   <= '0;
      acc     <= '0;
      ins     <= '0;
      ins_n   <= '0;
    end else if (state == S_FILL) begin
      if (in_fire) begin
        alg_q   <= alg_cur;
        start_q <= start_cur;
        off_q   <= off_cur;
        acc     <= acc_nx;
        widx    <= (in_sop ? '0 : widx) + 1'b1;
        if (in_eop) begin
          // a frame longer than the buffer is sent cut to BUF_BYTES
          len   <= (widx >= (AW+1)'(BUF_BYTES)) ? (AW+1)'(BUF_BYTES)
                 : (in_sop ? '0 : widx) + 1'b1;
          ridx  <= '0;
          state <= S_SEND;
          unique case (alg_cur)
            CHK_INET16: begin ins <= {~inet_fold(acc_nx), 16'h0}; ins_n <= 3'd2; end
            CHK_CRC32:  begin ins <= ~acc_nx;                     ins_n <= 3'd4; end
            default:    begin ins <= '0;                          ins_n <= 3'd0; end
          endcase
        end
      end
    end else if (out_fire) begin
      ridx <= ridx + 1'b1;
      if (ridx == len - 1'b1) begin
        state <= S_FILL;
        widx  <= '0;
      end
    end
  end

  // read out, substituting the check bytes
  assign rel       = ridx - (AW+1)'(off_q);
  assign out_valid = (state == S_SEND);
  assign out_fire  = out_valid && out_ready;
  assign out_sop   = (ridx == '0);
  assign out_eop   = (ridx == len - 1'b1);
  always_comb begin
    out_data = fbuf[ridx[AW-1:0]];
    if (ridx >= (AW+1)'(off_q) && rel < (AW+1)'(ins_n))
      out_data = ins[31 - 8*rel[1:0] -: 8];
  end
endmodule

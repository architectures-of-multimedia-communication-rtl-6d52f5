// rx_dma: receive DMA unit.
//
// It takes the tagged, checked packet stream and uses the connection entry
// of the packet's CN to split it into header and data part:
//  * isochronous connection: the header (hdr_len bytes) is discarded and the
//    data part is written into the connection's multimedia FIFO.  A byte that
//    finds its FIFO full is dropped and counted (mm_drop); isochronous data
//    tolerate loss, and the pipeline never stops for them.
//  * asynchronous connection (and any packet of an unknown connection): a
//    buffer slot is taken from the free queue; the header goes to the header
//    memory slot behind 16 bytes of receipt information and the data part to
//    the slot's buffer in data memory.  When the packet has ended, 16
//    clocks write the receipt information and the slot number is pushed into
//    the receive queue for the protocol processor.  Unknown connections are
//    stored with a header length of HDR_SLOT-16 bytes and no check.
//    If no slot is free, the first byte is held (in_ready low) until one is:
//    reliable traffic is stalled, not dropped.
// Receipt information (32-bit words, little-endian byte lanes):
//   word 0: [11:0] CN, [13:12] protocol, [14] known, [15] truncated,
//           [31:16] packet length in bytes
//   word 1: [15:0] header bytes stored, [31:16] data bytes stored
//   word 2: check sequence computed by the CG
//   word 3: [0] check ok, [2:1] check algorithm
// Bytes beyond the slot's header or data capacity are dropped and the packet
// is marked truncated.  One byte per clock; 16 extra clocks per asynchronous
// packet.
//
// From the architecture: isochronous data go to the connection's multimedia
// FIFO with the header discarded; asynchronous packets are split into header
// memory and data memory, the check sequence is added to the receipt
// information in header memory and the header pointer is put into the receive
// queue. This design's choices: slot layout, receipt format, drop on a full
// multimedia FIFO, stall when no slot is free, and handling of unknown
// connections.
//
// The assertions are checked on the clock only while rst_n is high; that
// clocked read of the asynchronous reset is for checking only and adds no
// logic, though lint tools report it as a mixed synchronous/asynchronous use.
module rx_dma
  import mpa_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // tagged packets from the check-sequence generator
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [7:0]             in_data,
  input  logic                   in_sop,
  input  logic                   in_eop,
  input  pkt_tag_t               in_tag,
  input  logic [31:0]            in_chk,
  input  logic                   in_chk_ok,
  // connection table read port
  output cn_t                    ct_cn,
  input  conn_info_t             ct_info,
  // free slot queue
  input  logic                   free_valid,
  input  logic [SLOT_W-1:0]      free_slot,
  output logic                   free_pop,
  // receive queue
  output logic                   rxq_push,
  output logic [SLOT_W-1:0]      rxq_slot,
  // header memory, DMA port
  output logic                   hm_en,
  output logic                   hm_we,
  output logic [$clog2(HMEM_BYTES)-1:0] hm_addr,
  output logic [7:0]             hm_wdata,
  // data memory, DMA port
  output logic                   dm_en,
  output logic                   dm_we,
  output logic [$clog2(DMEM_BYTES)-1:0] dm_addr,
  output logic [7:0]             dm_wdata,
  // multimedia FIFOs
  output logic [NUM_MMF-1:0]     mmf_wr,
  output logic [7:0]             mmf_wdata,
  input  logic [NUM_MMF-1:0]     mmf_full,
  // event counts
  output logic [31:0]            cnt_async,
  output logic [31:0]            cnt_iso,
  output logic [31:0]            cnt_mm_drop,
  output logic [31:0]            cnt_stall
);
  typedef enum logic [1:0] {S_IDLE, S_PKT, S_RCPT} state_e;

  state_e            state;
  logic              iso_q;
  logic [MMF_W-1:0]  mmf_q;
  logic [7:0]        hlen_q;
  logic [SLOT_W-1:0] slot_q;
  logic [LEN_W-1:0]  idx;          // offset of the next byte
  logic [15:0]       hcnt, dcnt;   // bytes stored
  logic              trunc_q;
  pkt_tag_t          tag_q;
  logic [31:0]       chk_q;
  logic              ok_q;
  chk_alg_e          alg_q;
  logic [1:0]        rword;        // receipt word being written
  logic [3:0]        rbyte;        // receipt byte being written
  logic [15:0]       len_q;

  logic              in_fire, start_ok, is_known, cur_iso;
  logic [7:0]        cur_hlen;
  logic [LEN_W-1:0]  cur_idx;
  logic [SLOT_W-1:0] cur_slot;
  logic              cur_iso_pkt;
  logic [MMF_W-1:0]  cur_mmf;
  logic              is_hdr;
  logic [LEN_W-1:0]  doff;
  logic [31:0]       rcpt;

  assign ct_cn    = in_tag.cn;
  assign is_known = in_tag.known && ct_info.valid;
  assign cur_iso  = is_known && ct_info.iso;
  // a packet may start when the DMA is idle and, if asynchronous, a slot is free
  assign start_ok = (state == S_IDLE) && (cur_iso || free_valid);
  assign in_ready = (state == S_PKT) || (in_valid && in_sop && start_ok);
  assign in_fire  = in_valid && in_ready;

  always_comb begin
    if (state == S_IDLE) begin
      cur_iso_pkt = cur_iso;
      cur_hlen    = !is_known ? 8'(HDR_SLOT - RCPT_BYTES)
                  : (ct_info.hdr_len > 8'(HDR_SLOT - RCPT_BYTES)) ? 8'(HDR_SLOT - RCPT_BYTES)
                  : ct_info.hdr_len;
      cur_slot    = free_slot;
      cur_mmf     = ct_info.mmf;
      cur_idx     = '0;
    end else begin
      cur_iso_pkt = iso_q;
      cur_hlen    = hlen_q;
      cur_slot    = slot_q;
      cur_mmf     = mmf_q;
      cur_idx     = idx;
    end
    is_hdr = cur_idx < LEN_W'(cur_hlen);
    doff   = cur_idx - LEN_W'(cur_hlen);
  end

  // memory and FIFO writes for the accepted byte, or the receipt words
  always_comb begin
    hm_en = 1'b0; hm_we = 1'b0; hm_addr = '0; hm_wdata = in_data;
    dm_en = 1'b0; dm_we = 1'b0; dm_addr = '0; dm_wdata = in_data;
    mmf_wr = '0;  mmf_wdata = in_data;
    unique case (rword)
      2'd0: rcpt = {len_q, trunc_q, tag_q.known, tag_q.proto, tag_q.cn};
      2'd1: rcpt = {dcnt, hcnt};
      2'd2: rcpt = chk_q;
      default: rcpt = {29'h0, alg_q, ok_q};
    endcase
    if (state == S_RCPT) begin
      // receipt information, one byte per clock (port A is byte-wide)
      hm_en    = 1'b1;
      hm_we    = 1'b1;
      hm_addr  = $clog2(HMEM_BYTES)'(slot_q * HDR_SLOT + rbyte);
      hm_wdata = rcpt[8*rbyte[1:0] +: 8];
    end else if (in_fire && (state == S_PKT || in_sop)) begin
      if (cur_iso_pkt) begin
        if (!is_hdr && !mmf_full[cur_mmf]) mmf_wr[cur_mmf] = 1'b1;
      end else if (is_hdr) begin
        hm_en   = 1'b1;
        hm_we   = 1'b1;
        hm_addr = $clog2(HMEM_BYTES)'(cur_slot * HDR_SLOT + RCPT_BYTES + cur_idx);
      end else if (doff < LEN_W'(DATA_BUF)) begin
        dm_en   = 1'b1;
        dm_we   = 1'b1;
        dm_addr = $clog2(DMEM_BYTES)'(cur_slot * DATA_BUF + doff);
      end
    end
  end

  assign free_pop = (state == S_IDLE) && in_fire && in_sop && !cur_iso;

  assign rword = rbyte[3:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      iso_q <= 1'b0; mmf_q <= '0; hlen_q <= '0; slot_q <= '0; idx <= '0;
      hcnt <= '0; dcnt <= '0; trunc_q <= 1'b0; tag_q <= '0; chk_q <= '0;
      ok_q <= 1'b0; alg_q <= CHK_NONE; rbyte <= '0; len_q <= '0;
      rxq_push <= 1'b0; rxq_slot <= '0;
      cnt_async <= '0; cnt_iso <= '0; cnt_mm_drop <= '0; cnt_stall <= '0;
    end else begin
      rxq_push <= 1'b0;
      if (state == S_IDLE && in_valid && in_sop && !start_ok) cnt_stall <= cnt_stall + 1'b1;
      if (in_fire && (state == S_PKT || in_sop)) begin
        if (state == S_IDLE) begin
          iso_q  <= cur_iso_pkt;
          mmf_q  <= cur_mmf;
          hlen_q <= cur_hlen;
          slot_q <= cur_slot;
          tag_q  <= in_tag;
          alg_q  <= is_known ? ct_info.alg : CHK_NONE;
          hcnt   <= '0;
          dcnt   <= '0;
          trunc_q <= 1'b0;
          state  <= S_PKT;
        end
        idx <= cur_idx + 1'b1;
        if (cur_iso_pkt) begin
          if (!is_hdr && mmf_full[cur_mmf]) cnt_mm_drop <= cnt_mm_drop + 1'b1;
        end else begin
          if (is_hdr) hcnt <= ((state == S_IDLE) ? 16'h0 : hcnt) + 1'b1;
          else if (doff < LEN_W'(DATA_BUF)) dcnt <= ((state == S_IDLE) ? 16'h0 : dcnt) + 1'b1;
          else trunc_q <= 1'b1;
        end
        if (in_eop) begin
          len_q <= cur_idx + 1'b1;
          chk_q <= in_chk;
          ok_q  <= in_chk_ok;
          if (cur_iso_pkt) begin
            state   <= S_IDLE;
            cnt_iso <= cnt_iso + 1'b1;
          end else begin
            state <= S_RCPT;
            rbyte <= '0;
          end
        end
      end else if (state == S_RCPT) begin
        rbyte <= rbyte + 1'b1;
        if (rbyte == 4'hF) begin
          state     <= S_IDLE;
          rxq_push  <= 1'b1;
          rxq_slot  <= slot_q;
          cnt_async <= cnt_async + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) a_idle_sop: assert (!(state == S_IDLE && in_fire) || in_sop);
  end
endmodule

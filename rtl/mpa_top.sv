// mpa_top: Multimedia Protocol Adapter (MPA) for a Gb/s network.
//
// The adapter separates isochronous multimedia traffic from asynchronous data
// traffic in hardware and does every per-byte operation in two pipelines, one
// for receiving and one for sending, each with its own memories.
//
// Receive pipeline: frames from the network access unit enter the protocol
// filter, which finds the connection number (CN); the check-sequence
// generator computes the check sequence the CN's connection uses; the receive
// DMA unit sends the data part of isochronous packets to that connection's
// multimedia FIFO (header dropped) and writes asynchronous packets into the
// receive header memory (header plus receipt information) and receive data
// memory (payload), then puts the slot number into the receive queue.
//
// Transmit pipeline: the protocol processor writes a header into a slot of the
// transmit header memory (payload into transmit data memory, or a multimedia
// device fills a transmit multimedia FIFO) and pushes a command into the send
// queue; the transmit DMA gathers header and payload, and the transmit
// check-sequence generator inserts the check sequence as the frame goes to the
// network access unit.
//
// Outside this module, and brought out as ports: the network access unit
// (frame streams rx_* and tx_*), the protocol processors (CAM and connection
// table loading, header and data memory ports, receive/free/send queues) and
// the multimedia bus (multimedia FIFO ports).  The protocol processor can
// also write bytes into a receive multimedia FIFO (pmm_*), for multimedia
// connections that use a reliable transport and so are processed as
// asynchronous traffic; the receive DMA has priority on a FIFO.  One clock domain throughout;
// one byte per clock on each pipeline.  Active-low asynchronous reset; after
// reset the receive free queue needs NUM_SLOTS clocks to fill.
//
// Beside the MPA, and sharing only clock and reset, stand the host-interface
// queues of the light-weight multimedia adapter (the second, lower-speed
// design): one set for its transmit memory (lwt_*) and one for its receive
// memory (lwr_*), each a free-buffer queue plus one buffer queue per active
// multimedia connection.  Their users (host application, DSP coder/decoder,
// DMA unit) are outside and reach them through these ports.  The same
// adapter's receive side has its own protocol filter (lw_rx_* in, lw_dec_*
// with the connection tag out to the decoder, lw_cam_* to load its CAM).
//
// From the architecture: the two pipelines, the split into header and data
// memories, the receive and send queues and the per-connection multimedia
// FIFOs; the light-weight adapter's free, send and receive buffer queues.
// This design's choices: all widths and sizes, the byte-stream handshake, the
// memory ports and the counters.
module mpa_top
  import mpa_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  // network access unit: received frames
  input  logic                         rx_valid,
  output logic                         rx_ready,
  input  logic [7:0]                   rx_data,
  input  logic                         rx_sop,
  input  logic                         rx_eop,
  // network access unit: frames to send
  output logic                         tx_valid,
  input  logic                         tx_ready,
  output logic [7:0]                   tx_data,
  output logic                         tx_sop,
  output logic                         tx_eop,
  // protocol processor: CAM and connection table
  input  logic                         cam_wr_en,
  input  logic [CAM_AW-1:0]            cam_wr_addr,
  input  logic                         cam_wr_valid,
  input  cam_key_t                     cam_wr_key,
  input  logic                         ct_wr_en,
  input  cn_t                          ct_wr_cn,
  input  conn_info_t                   ct_wr_info,
  // protocol processor: receive header memory and data memory (word ports)
  input  logic                         rxh_en,
  input  logic [3:0]                   rxh_we,
  input  logic [$clog2(HMEM_BYTES)-3:0] rxh_addr,
  input  logic [31:0]                  rxh_wdata,
  output logic [31:0]                  rxh_rdata,
  input  logic                         rxd_en,
  input  logic [3:0]                   rxd_we,
  input  logic [$clog2(DMEM_BYTES)-3:0] rxd_addr,
  input  logic [31:0]                  rxd_wdata,
  output logic [31:0]                  rxd_rdata,
  // protocol processor: receive queue and slot release
  output logic                         rxq_valid,
  output logic [SLOT_W-1:0]            rxq_slot,
  input  logic                         rxq_pop,
  input  logic                         rx_release,
  input  logic [SLOT_W-1:0]            rx_release_slot,
  // protocol processor: transmit header memory and data memory (word ports)
  input  logic                         txh_en,
  input  logic [3:0]                   txh_we,
  input  logic [$clog2(HMEM_BYTES)-3:0] txh_addr,
  input  logic [31:0]                  txh_wdata,
  output logic [31:0]                  txh_rdata,
  input  logic                         txd_en,
  input  logic [3:0]                   txd_we,
  input  logic [$clog2(DMEM_BYTES)-3:0] txd_addr,
  input  logic [31:0]                  txd_wdata,
  output logic [31:0]                  txd_rdata,
  // protocol processor: send queue and completion
  input  logic                         sq_push,
  input  send_cmd_t                    sq_cmd,
  output logic                         sq_full,
  output logic                         tx_done,
  output logic [SLOT_W-1:0]            tx_done_slot,
  // multimedia bus: receive FIFOs (read) and transmit FIFOs (write)
  input  logic [NUM_MMF-1:0]           mmr_rd,
  output logic [NUM_MMF-1:0][7:0]      mmr_data,
  output logic [NUM_MMF-1:0]           mmr_empty,
  input  logic [NUM_MMF-1:0]           mmt_wr,
  input  logic [NUM_MMF-1:0][7:0]      mmt_data,
  output logic [NUM_MMF-1:0]           mmt_full,
  // event counters
  output logic [31:0]                  cnt_rx_async,
  output logic [31:0]                  cnt_rx_iso,
  output logic [31:0]                  cnt_mm_drop,
  output logic [31:0]                  cnt_rx_stall,
  // protocol processor: reliable multimedia data into a receive multimedia
  // FIFO (a byte is written when pmm_wr && pmm_ready)
  input  logic                         pmm_wr,
  input  logic [MMF_W-1:0]             pmm_mmf,
  input  logic [7:0]                   pmm_data,
  output logic                         pmm_ready,
  // light-weight adapter host interface: transmit-memory buffer queues
  output logic                         lwt_fb_valid,
  output logic [SLOT_W-1:0]            lwt_fb_buf,
  input  logic                         lwt_fb_get,
  input  logic                         lwt_fb_put,
  input  logic [SLOT_W-1:0]            lwt_fb_put_buf,
  output logic [SLOT_W:0]              lwt_fb_count,
  input  logic [NUM_MMF-1:0]           lwt_push,
  input  logic [NUM_MMF-1:0][SLOT_W-1:0] lwt_push_buf,
  output logic [NUM_MMF-1:0]           lwt_full,
  output logic [NUM_MMF-1:0]           lwt_head_valid,
  output logic [NUM_MMF-1:0][SLOT_W-1:0] lwt_head_buf,
  input  logic [NUM_MMF-1:0]           lwt_pop,
  output logic [NUM_MMF-1:0][SLOT_W:0] lwt_qcount,
  // light-weight adapter host interface: receive-memory buffer queues
  output logic                         lwr_fb_valid,
  output logic [SLOT_W-1:0]            lwr_fb_buf,
  input  logic                         lwr_fb_get,
  input  logic                         lwr_fb_put,
  input  logic [SLOT_W-1:0]            lwr_fb_put_buf,
  output logic [SLOT_W:0]              lwr_fb_count,
  input  logic [NUM_MMF-1:0]           lwr_push,
  input  logic [NUM_MMF-1:0][SLOT_W-1:0] lwr_push_buf,
  output logic [NUM_MMF-1:0]           lwr_full,
  output logic [NUM_MMF-1:0]           lwr_head_valid,
  output logic [NUM_MMF-1:0][SLOT_W-1:0] lwr_head_buf,
  input  logic [NUM_MMF-1:0]           lwr_pop,
  output logic [NUM_MMF-1:0][SLOT_W:0] lwr_qcount,
  // light-weight adapter receive side: frames from its network access unit,
  // classified frames with their connection tag to its decoder (DSP), and the
  // CAM load port of its protocol filter
  input  logic                         lw_rx_valid,
  output logic                         lw_rx_ready,
  input  logic [7:0]                   lw_rx_data,
  input  logic                         lw_rx_sop,
  input  logic                         lw_rx_eop,
  output logic                         lw_dec_valid,
  input  logic                         lw_dec_ready,
  output logic [7:0]                   lw_dec_data,
  output logic                         lw_dec_sop,
  output logic                         lw_dec_eop,
  output pkt_tag_t                     lw_dec_tag,
  input  logic                         lw_cam_wr_en,
  input  logic [CAM_AW-1:0]            lw_cam_wr_addr,
  input  logic                         lw_cam_wr_valid,
  input  cam_key_t                     lw_cam_wr_key
);
  localparam int unsigned HA = $clog2(HMEM_BYTES);
  localparam int unsigned DA = $clog2(DMEM_BYTES);

  // ---------------- connection table: ports 0 rx CG, 1 rx DMA, 2 tx CG
  cn_t        [2:0] ct_rd_cn;
  conn_info_t [2:0] ct_rd_info;

  conn_table #(.NRD(3)) u_ct (
    .clk, .rst_n,
    .wr_en(ct_wr_en), .wr_cn(ct_wr_cn), .wr_info(ct_wr_info),
    .rd_cn(ct_rd_cn), .rd_info(ct_rd_info)
  );

  // ---------------- receive pipeline
  logic       pf_valid, pf_ready, pf_sop, pf_eop;
  logic [7:0] pf_data;
  pkt_tag_t   pf_tag;

  protocol_filter u_pf (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_ready(rx_ready), .in_data(rx_data),
    .in_sop(rx_sop), .in_eop(rx_eop),
    .out_valid(pf_valid), .out_ready(pf_ready), .out_data(pf_data),
    .out_sop(pf_sop), .out_eop(pf_eop), .out_tag(pf_tag),
    .cam_wr_en, .cam_wr_addr, .cam_wr_valid, .cam_wr_key
  );

  logic        cg_valid, cg_ready, cg_sop, cg_eop, cg_ok;
  logic [7:0]  cg_data;
  pkt_tag_t    cg_tag;
  logic [31:0] cg_chk;

  check_gen u_rx_cg (
    .clk, .rst_n,
    .in_valid(pf_valid), .in_ready(pf_ready), .in_data(pf_data),
    .in_sop(pf_sop), .in_eop(pf_eop), .in_tag(pf_tag),
    .out_valid(cg_valid), .out_ready(cg_ready), .out_data(cg_data),
    .out_sop(cg_sop), .out_eop(cg_eop), .out_tag(cg_tag),
    .out_chk(cg_chk), .out_chk_ok(cg_ok),
    .ct_cn(ct_rd_cn[0]), .ct_info(ct_rd_info[0])
  );

  logic              fq_valid, fq_pop;
  logic [SLOT_W-1:0] fq_slot;
  logic [SLOT_W:0]   fq_count;
  logic              rq_push;
  logic [SLOT_W-1:0] rq_slot;
  logic              rq_empty, rq_full;
  logic [SLOT_W:0]   rq_count;
  logic              rhm_en, rhm_we, rdm_en, rdm_we;
  logic [HA-1:0]     rhm_addr;
  logic [DA-1:0]     rdm_addr;
  logic [7:0]        rhm_wdata, rdm_wdata, rhm_rdata, rdm_rdata;
  logic [NUM_MMF-1:0]      rmm_wr, rmm_full;
  logic [7:0]              rmm_wdata;
  logic [NUM_MMF-1:0][$clog2(MMF_DEPTH):0] rmm_count;

  free_queue #(.N(NUM_SLOTS)) u_rx_free (
    .clk, .rst_n,
    .alloc_valid(fq_valid), .alloc_slot(fq_slot), .alloc_pop(fq_pop),
    .release_en(rx_release), .release_slot(rx_release_slot),
    .free_count(fq_count)
  );

  rx_dma u_rx_dma (
    .clk, .rst_n,
    .in_valid(cg_valid), .in_ready(cg_ready), .in_data(cg_data),
    .in_sop(cg_sop), .in_eop(cg_eop), .in_tag(cg_tag),
    .in_chk(cg_chk), .in_chk_ok(cg_ok),
    .ct_cn(ct_rd_cn[1]), .ct_info(ct_rd_info[1]),
    .free_valid(fq_valid), .free_slot(fq_slot), .free_pop(fq_pop),
    .rxq_push(rq_push), .rxq_slot(rq_slot),
    .hm_en(rhm_en), .hm_we(rhm_we), .hm_addr(rhm_addr), .hm_wdata(rhm_wdata),
    .dm_en(rdm_en), .dm_we(rdm_we), .dm_addr(rdm_addr), .dm_wdata(rdm_wdata),
    .mmf_wr(rmm_wr), .mmf_wdata(rmm_wdata), .mmf_full(rmm_full),
    .cnt_async(cnt_rx_async), .cnt_iso(cnt_rx_iso),
    .cnt_mm_drop(cnt_mm_drop), .cnt_stall(cnt_rx_stall)
  );

  sync_fifo #(.WIDTH(SLOT_W), .DEPTH(NUM_SLOTS)) u_rxq (
    .clk, .rst_n,
    .wr_en(rq_push), .wr_data(rq_slot),
    .rd_en(rxq_pop), .rd_data(rxq_slot),
    .empty(rq_empty), .full(rq_full), .count(rq_count)
  );
  assign rxq_valid = !rq_empty;

  dpram #(.BYTES(HMEM_BYTES)) u_rx_hmem (
    .clk,
    .a_en(rhm_en), .a_we(rhm_we), .a_addr(rhm_addr), .a_wdata(rhm_wdata), .a_rdata(rhm_rdata),
    .b_en(rxh_en), .b_we(rxh_we), .b_addr(rxh_addr), .b_wdata(rxh_wdata), .b_rdata(rxh_rdata)
  );

  dpram #(.BYTES(DMEM_BYTES)) u_rx_dmem (
    .clk,
    .a_en(rdm_en), .a_we(rdm_we), .a_addr(rdm_addr), .a_wdata(rdm_wdata), .a_rdata(rdm_rdata),
    .b_en(rxd_en), .b_we(rxd_we), .b_addr(rxd_addr), .b_wdata(rxd_wdata), .b_rdata(rxd_rdata)
  );

  // Receive multimedia FIFO writes: the receive DMA, or the protocol
  // processor delivering multimedia data it has received over a reliable
  // transport.  The DMA has priority; a processor byte waits (pmm_ready low)
  // rather than being dropped.
  logic [NUM_MMF-1:0]      mmw_wr;
  logic [NUM_MMF-1:0][7:0] mmw_data;
  always_comb begin
    for (int f = 0; f < NUM_MMF; f++) begin
      mmw_wr[f]   = rmm_wr[f];
      mmw_data[f] = rmm_wdata;
      if (!rmm_wr[f] && pmm_wr && pmm_mmf == MMF_W'(f) && !rmm_full[f]) begin
        mmw_wr[f]   = 1'b1;
        mmw_data[f] = pmm_data;
      end
    end
  end
  assign pmm_ready = !rmm_wr[pmm_mmf] && !rmm_full[pmm_mmf];

  mm_fifo_bank #(.NUM(NUM_MMF), .DEPTH(MMF_DEPTH)) u_rx_mmf (
    .clk, .rst_n,
    .wr_en(mmw_wr), .wr_data(mmw_data), .full(rmm_full),
    .rd_en(mmr_rd), .rd_data(mmr_data), .empty(mmr_empty), .count(rmm_count)
  );

  // ---------------- transmit pipeline
  logic              sq_empty;
  logic [SLOT_W:0]   sq_count;
  send_cmd_t         sq_head;
  logic              sq_pop;
  logic              thm_en, tdm_en;
  logic [HA-1:0]     thm_addr;
  logic [DA-1:0]     tdm_addr;
  logic [7:0]        thm_rdata, tdm_rdata;
  logic [NUM_MMF-1:0]      tmm_rd, tmm_empty;
  logic [NUM_MMF-1:0][7:0] tmm_rdata;
  logic [NUM_MMF-1:0][$clog2(MMF_DEPTH):0] tmm_count;
  logic              td_valid, td_ready, td_sop, td_eop;
  logic [7:0]        td_data;
  cn_t               td_cn;

  sync_fifo #(.WIDTH($bits(send_cmd_t)), .DEPTH(NUM_SLOTS)) u_sendq (
    .clk, .rst_n,
    .wr_en(sq_push), .wr_data(sq_cmd),
    .rd_en(sq_pop), .rd_data(sq_head),
    .empty(sq_empty), .full(sq_full), .count(sq_count)
  );

  mm_fifo_bank #(.NUM(NUM_MMF), .DEPTH(MMF_DEPTH)) u_tx_mmf (
    .clk, .rst_n,
    .wr_en(mmt_wr), .wr_data(mmt_data), .full(mmt_full),
    .rd_en(tmm_rd), .rd_data(tmm_rdata), .empty(tmm_empty), .count(tmm_count)
  );

  dpram #(.BYTES(HMEM_BYTES)) u_tx_hmem (
    .clk,
    .a_en(thm_en), .a_we(1'b0), .a_addr(thm_addr), .a_wdata(8'h00), .a_rdata(thm_rdata),
    .b_en(txh_en), .b_we(txh_we), .b_addr(txh_addr), .b_wdata(txh_wdata), .b_rdata(txh_rdata)
  );

  dpram #(.BYTES(DMEM_BYTES)) u_tx_dmem (
    .clk,
    .a_en(tdm_en), .a_we(1'b0), .a_addr(tdm_addr), .a_wdata(8'h00), .a_rdata(tdm_rdata),
    .b_en(txd_en), .b_we(txd_we), .b_addr(txd_addr), .b_wdata(txd_wdata), .b_rdata(txd_rdata)
  );

  tx_dma u_tx_dma (
    .clk, .rst_n,
    .sq_valid(!sq_empty), .sq_cmd(sq_head), .sq_pop,
    .hm_en(thm_en), .hm_addr(thm_addr), .hm_rdata(thm_rdata),
    .dm_en(tdm_en), .dm_addr(tdm_addr), .dm_rdata(tdm_rdata),
    .mmf_rd(tmm_rd), .mmf_rdata(tmm_rdata), .mmf_empty(tmm_empty),
    .out_valid(td_valid), .out_ready(td_ready), .out_data(td_data),
    .out_sop(td_sop), .out_eop(td_eop), .out_cn(td_cn),
    .done(tx_done), .done_slot(tx_done_slot)
  );

  tx_check_insert #(.BUF_BYTES(FRAME_BUF)) u_tx_cg (
    .clk, .rst_n,
    .in_valid(td_valid), .in_ready(td_ready), .in_data(td_data),
    .in_sop(td_sop), .in_eop(td_eop), .in_cn(td_cn),
    .ct_cn(ct_rd_cn[2]), .ct_info(ct_rd_info[2]),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_data(tx_data),
    .out_sop(tx_sop), .out_eop(tx_eop)
  );
  // ---------------------------------------------------------------------
  // Light-weight adapter host-interface queues (independent of the MPA)
  lwma_host_queues #(.NBUF(NUM_SLOTS), .NCONN(NUM_MMF)) u_lwma_txq (
    .clk, .rst_n,
    .fb_valid(lwt_fb_valid), .fb_buf(lwt_fb_buf), .fb_get(lwt_fb_get),
    .fb_put(lwt_fb_put), .fb_put_buf(lwt_fb_put_buf), .fb_count(lwt_fb_count),
    .push(lwt_push), .push_buf(lwt_push_buf), .full(lwt_full),
    .head_valid(lwt_head_valid), .head_buf(lwt_head_buf), .pop(lwt_pop), .qcount(lwt_qcount)
  );
  lwma_host_queues #(.NBUF(NUM_SLOTS), .NCONN(NUM_MMF)) u_lwma_rxq (
    .clk, .rst_n,
    .fb_valid(lwr_fb_valid), .fb_buf(lwr_fb_buf), .fb_get(lwr_fb_get),
    .fb_put(lwr_fb_put), .fb_put_buf(lwr_fb_put_buf), .fb_count(lwr_fb_count),
    .push(lwr_push), .push_buf(lwr_push_buf), .full(lwr_full),
    .head_valid(lwr_head_valid), .head_buf(lwr_head_buf), .pop(lwr_pop), .qcount(lwr_qcount)
  );
  // its protocol filter: finds the CN of each received frame for the decoder
  protocol_filter u_lwma_pf (
    .clk, .rst_n,
    .in_valid(lw_rx_valid), .in_ready(lw_rx_ready), .in_data(lw_rx_data),
    .in_sop(lw_rx_sop), .in_eop(lw_rx_eop),
    .out_valid(lw_dec_valid), .out_ready(lw_dec_ready), .out_data(lw_dec_data),
    .out_sop(lw_dec_sop), .out_eop(lw_dec_eop), .out_tag(lw_dec_tag),
    .cam_wr_en(lw_cam_wr_en), .cam_wr_addr(lw_cam_wr_addr),
    .cam_wr_valid(lw_cam_wr_valid), .cam_wr_key(lw_cam_wr_key)
  );
endmodule

// tb_mpa_workload: the adapter under the TCP/IP loads it is sized for.
//  * 1024-byte TCP segments (1064-byte packets) arrive back to back while a
//    processor model takes each receipt and frees the slot; the receive side
//    must sustain one byte per clock plus 16 clocks of receipt per packet
//    (1080 clocks per segment), and every check must be good.
//  * At the same time 1024-byte segments are sent; the transmit side takes
//    two clocks per byte (store and forward), 2128 clocks per segment.
//  * A 4 kByte segment does not fit a 2048-byte data buffer: it must arrive
//    marked truncated with exactly 2048 data bytes stored.
// From the measured clocks per segment it prints the segment rate reached at
// 78 MHz, the clock that carries 622 Mb/s on the receive side.
// The traffic, the reference models and the expected values are this
// testbench's own; the rates checked are the design's stated ones.
module tb_mpa_workload;
  import mpa_pkg::*;
  import tb_pkt_pkg::*;

  logic clk = 0, rst_n = 0;
  logic rx_valid, rx_ready, rx_sop, rx_eop;
  logic [7:0] rx_data;
  logic tx_valid, tx_ready, tx_sop, tx_eop;
  logic [7:0] tx_data;
  logic cam_wr_en, cam_wr_valid;
  logic [CAM_AW-1:0] cam_wr_addr;
  cam_key_t cam_wr_key;
  logic ct_wr_en;
  cn_t ct_wr_cn;
  conn_info_t ct_wr_info;
  logic rxh_en, rxd_en, txh_en, txd_en;
  logic [3:0] rxh_we, rxd_we, txh_we, txd_we;
  logic [$clog2(HMEM_BYTES)-3:0] rxh_addr, txh_addr;
  logic [$clog2(DMEM_BYTES)-3:0] rxd_addr, txd_addr;
  logic [31:0] rxh_wdata, rxh_rdata, rxd_wdata, rxd_rdata, txh_wdata, txh_rdata, txd_wdata, txd_rdata;
  logic rxq_valid, rxq_pop, rx_release;
  logic [SLOT_W-1:0] rxq_slot, rx_release_slot, tx_done_slot;
  logic sq_push, sq_full, tx_done;
  send_cmd_t sq_cmd;
  logic [NUM_MMF-1:0] mmr_rd, mmr_empty, mmt_wr, mmt_full;
  logic [NUM_MMF-1:0][7:0] mmr_data, mmt_data;
  logic [31:0] cnt_rx_async, cnt_rx_iso, cnt_mm_drop, cnt_rx_stall;
  logic lw_rx_valid, lw_rx_ready, lw_rx_sop, lw_rx_eop, lw_dec_valid, lw_dec_ready, lw_dec_sop, lw_dec_eop;
  logic [7:0] lw_rx_data, lw_dec_data;
  pkt_tag_t lw_dec_tag;
  logic lw_cam_wr_en, lw_cam_wr_valid;
  logic [CAM_AW-1:0] lw_cam_wr_addr;
  cam_key_t lw_cam_wr_key;
  logic pmm_wr, pmm_ready;
  logic [MMF_W-1:0] pmm_mmf;
  logic [7:0] pmm_data;
  logic lwt_fb_valid, lwt_fb_get, lwt_fb_put, lwr_fb_valid, lwr_fb_get, lwr_fb_put;
  logic [SLOT_W-1:0] lwt_fb_buf, lwt_fb_put_buf, lwr_fb_buf, lwr_fb_put_buf;
  logic [SLOT_W:0] lwt_fb_count, lwr_fb_count;
  logic [NUM_MMF-1:0] lwt_push, lwt_full, lwt_head_valid, lwt_pop;
  logic [NUM_MMF-1:0] lwr_push, lwr_full, lwr_head_valid, lwr_pop;
  logic [NUM_MMF-1:0][SLOT_W-1:0] lwt_push_buf, lwt_head_buf, lwr_push_buf, lwr_head_buf;
  logic [NUM_MMF-1:0][SLOT_W:0] lwt_qcount, lwr_qcount;

  mpa_top dut (.*);

  always #5 clk = ~clk;

  localparam cn_t CN_TCP = cn_t'(12'h320);
  localparam int SEG = 1024, NSEG = 24, PKT = SEG + 40;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic bq_t tcp_pkt(input int pay, input int seed);
    bq_t p; shortint unsigned s;
    p = ip_packet(5, 6, 32'h0A000001, 32'h0A0000FE, 1234, 80, pay, seed);
    s = ~inet_sum(p, 20);
    p[36] = s[15:8]; p[37] = s[7:0];
    return p;
  endfunction

  task automatic rxh_read(input int byte_addr, output logic [31:0] d);
    @(negedge clk); rxh_en = 1; rxh_we = 0; rxh_addr = ($clog2(HMEM_BYTES)-2)'(byte_addr / 4);
    @(negedge clk); rxh_en = 0; d = rxh_rdata;
  endtask

  task automatic net_send(input bq_t p);
    for (int i = 0; i < p.size(); i++) begin
      @(negedge clk);
      rx_valid = 1; rx_data = p[i]; rx_sop = (i == 0); rx_eop = (i == p.size() - 1);
      #1;
      while (!rx_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    rx_valid = 0; rx_sop = 0; rx_eop = 0;
  endtask

  // processor model: takes each receipt, checks it, frees the slot
  int rx_seen = 0, rx_ok = 0;
  longint rx_first = -1, rx_last = 0;
  logic [31:0] last_w0, last_w1, last_w3;
  initial begin
    logic [31:0] w0, w1, w3;
    int s;
    forever begin
      @(negedge clk);
      if (rst_n && rxq_valid) begin
        s = rxq_slot;
        rx_last = cyc;
        rxq_pop = 1; @(negedge clk); rxq_pop = 0;
        rxh_read(s * HDR_SLOT, w0);
        rxh_read(s * HDR_SLOT + 4, w1);
        rxh_read(s * HDR_SLOT + 12, w3);
        last_w0 = w0; last_w1 = w1; last_w3 = w3;
        rx_seen++;
        if (w3[0]) rx_ok++;
        rx_release = 1; rx_release_slot = SLOT_W'(s);
        @(negedge clk); rx_release = 0;
      end
    end
  end

  // transmit side: count frames and the clocks between their ends
  int tx_frames = 0;
  longint tx_t[$];
  always @(posedge clk)
    if (rst_n && tx_valid && tx_ready && tx_eop) begin tx_frames++; tx_t.push_back(cyc); end

  task automatic txh_write_bytes(input int byte_addr, input bq_t b);
    for (int i = 0; i < b.size(); i += 4) begin
      logic [31:0] w; logic [3:0] be;
      w = '0; be = '0;
      for (int k = 0; k < 4 && i + k < b.size(); k++) begin w[8*k +: 8] = b[i + k]; be[k] = 1; end
      @(negedge clk); txh_en = 1; txh_we = be; txh_addr = ($clog2(HMEM_BYTES)-2)'((byte_addr + i) / 4); txh_wdata = w;
    end
    @(negedge clk); txh_en = 0; txh_we = 0;
  endtask
  task automatic txd_write_bytes(input int byte_addr, input bq_t b);
    for (int i = 0; i < b.size(); i += 4) begin
      logic [31:0] w; logic [3:0] be;
      w = '0; be = '0;
      for (int k = 0; k < 4 && i + k < b.size(); k++) begin w[8*k +: 8] = b[i + k]; be[k] = 1; end
      @(negedge clk); txd_en = 1; txd_we = be; txd_addr = ($clog2(DMEM_BYTES)-2)'((byte_addr + i) / 4); txd_wdata = w;
    end
    @(negedge clk); txd_en = 0; txd_we = 0;
  endtask

  initial begin
    bq_t p, hdr, pay;
    longint t0, t1;
    cam_key_t k;
    conn_info_t ci;
    rx_valid = 0; rx_sop = 0; rx_eop = 0; rx_data = 0;
    cam_wr_en = 0; cam_wr_valid = 0; cam_wr_addr = 0; cam_wr_key = '0;
    ct_wr_en = 0; ct_wr_cn = '0; ct_wr_info = '0;
    rxh_en = 0; rxh_we = 0; rxh_addr = 0; rxh_wdata = 0;
    rxd_en = 0; rxd_we = 0; rxd_addr = 0; rxd_wdata = 0;
    txh_en = 0; txh_we = 0; txh_addr = 0; txh_wdata = 0;
    txd_en = 0; txd_we = 0; txd_addr = 0; txd_wdata = 0;
    rxq_pop = 0; rx_release = 0; rx_release_slot = 0;
    sq_push = 0; sq_cmd = '0; mmr_rd = 0; mmt_wr = 0; mmt_data = '0; tx_ready = 1;
    pmm_wr = 0; pmm_mmf = 0; pmm_data = 0;
    lw_rx_valid = 0; lw_rx_sop = 0; lw_rx_eop = 0; lw_rx_data = 0; lw_dec_ready = 1;
    lw_cam_wr_en = 0; lw_cam_wr_valid = 0; lw_cam_wr_addr = 0; lw_cam_wr_key = '0;
    lwt_fb_get = 0; lwt_fb_put = 0; lwt_fb_put_buf = 0; lwt_push = 0; lwt_push_buf = '0; lwt_pop = 0;
    lwr_fb_get = 0; lwr_fb_put = 0; lwr_fb_put_buf = 0; lwr_push = 0; lwr_push_buf = '0; lwr_pop = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (NUM_SLOTS + 2) @(posedge clk);

    // one TCP connection: IPv4 / TCP from 10.0.0.1 / ports 1234 -> 80
    for (int r = 0; r < 3; r++) begin
      k.level = 2'(r);
      k.ptype = (r == 0) ? 8'd4 : 8'd6;
      k.addr  = (r == 0) ? 32'h0 : (r == 1) ? 32'h0A000001 : {16'd1234, 16'd80};
      @(negedge clk); cam_wr_en = 1; cam_wr_addr = CAM_AW'(r == 0 ? 0 : r + 1); cam_wr_valid = 1; cam_wr_key = k;
    end
    ci = '0; ci.valid = 1; ci.alg = CHK_INET16; ci.hdr_len = 40; ci.chk_start = 20; ci.chk_off = 36;
    @(negedge clk); cam_wr_en = 0; ct_wr_en = 1; ct_wr_cn = CN_TCP; ct_wr_info = ci;
    @(negedge clk); ct_wr_en = 0;

    // transmit data: NSEG segments from slots 0..NSEG-1 (mod 16)
    p = ip_packet(5, 6, 32'h0A000001, 32'h0A0000FE, 1234, 80, SEG, 1);
    hdr = head(p, 40); pay.delete(); for (int i = 40; i < p.size(); i++) pay.push_back(p[i]);
    for (int s = 0; s < NUM_SLOTS; s++) begin
      txh_write_bytes(s * HDR_SLOT, hdr);
      txd_write_bytes(s * DATA_BUF, pay);
    end

    fork
      // receive NSEG back-to-back segments
      begin
        @(negedge clk); t0 = cyc;
        for (int n = 0; n < NSEG; n++) net_send(tcp_pkt(SEG, n));
        while (rx_seen < NSEG) @(negedge clk);
        t1 = rx_last;
        chk(rx_ok == NSEG, $sformatf("%0d of %0d segments with good checksum", rx_ok, NSEG));
        $display("receive: %0d segments of %0d bytes in %0d clocks = %0d clocks/segment (1064 bytes + %0d receipt clocks)",
                 NSEG, SEG, t1 - t0, (t1 - t0) / NSEG, RCPT_BYTES);
        chk((t1 - t0) <= longint'(NSEG) * (PKT + RCPT_BYTES) + 200, "receive sustains one byte per clock plus receipt");
        $display("receive at 78 MHz: %0d segments/s", 78_000_000 / ((t1 - t0) / NSEG));
      end
      // transmit NSEG segments at the same time
      begin
        for (int n = 0; n < NSEG; n++) begin
          send_cmd_t c;
          c = '0; c.slot = SLOT_W'(n % NUM_SLOTS); c.cn = CN_TCP; c.hdr_len = 40; c.data_len = OFF_W'(SEG);
          @(negedge clk);
          while (sq_full) @(negedge clk);
          sq_push = 1; sq_cmd = c;
          @(negedge clk); sq_push = 0;
        end
        while (tx_frames < NSEG) @(negedge clk);
        begin
          longint per;
          per = (tx_t[NSEG - 1] - tx_t[0]) / (NSEG - 1);
          $display("transmit: %0d clocks/segment (bound %0d)", per, 2 * PKT);
          chk(per <= 2 * PKT + 16, "transmit takes two clocks per byte");
          chk(per >= 2 * PKT, "transmit store-and-forward as specified");
        end
      end
    join

    // a 4 kByte segment does not fit the data buffer: truncated
    begin
      int seen0;
      seen0 = rx_seen;
      p = tcp_pkt(4096, 77);
      net_send(p);
      while (rx_seen == seen0) @(negedge clk);
      repeat (10) @(negedge clk);
      chk(last_w0[15] == 1'b1, "4 kByte segment marked truncated");
      chk(last_w3[0] == 1'b1, "checksum of the whole 4 kByte segment verified");
      chk(last_w0[31:16] == 16'(p.size()), "length of the 4 kByte segment reported");
      chk(last_w1[31:16] == 16'(DATA_BUF), $sformatf("data bytes stored %0d = DATA_BUF", last_w1[31:16]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

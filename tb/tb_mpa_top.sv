// tb_mpa_top: end-to-end test of the Multimedia Protocol Adapter at its
// default sizes.  The testbench plays the protocol processor, the network
// access unit and the multimedia devices:
//  1. loads the protocol address tree into the CAM (IP and ST-II, a TCP and a
//     UDP connection, two ST-II streams) and the connection table;
//  2. receives TCP packets (checksum), UDP packets (CRC-32 trailer), ST-II
//     packets of two streams, packets of unknown connections and corrupted
//     packets, and checks receive queue, receipt information, header and data
//     memory contents and the multimedia FIFO streams;
//  3. withholds slot releases until the receive DMA stalls, and overfills a
//     multimedia FIFO until it drops data;
//  4. transmits TCP and UDP packets from header/data memory and an ST-II
//     packet from a multimedia FIFO, with network back-pressure, checks the
//     inserted check sequences, and loops the transmitted frames back into
//     the receiver, which must find their check sequences correct;
//  5. has the processor write into a multimedia FIFO that a stream is
//     filling at the same time;
//  6. passes buffers through the light-weight adapter's free, send and
//     receive queues, and has that adapter's protocol filter tag frames.
// Each mechanism is counted; one that never happened is a failure.
//
// The traffic, the reference models and the expected values are this
// testbench's own; the behaviour checked is the one described in the module's
// header.
module tb_mpa_top;
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
  logic lwt_fb_valid, lwt_fb_get, lwt_fb_put, lwr_fb_valid, lwr_fb_get, lwr_fb_put;
  logic [SLOT_W-1:0] lwt_fb_buf, lwt_fb_put_buf, lwr_fb_buf, lwr_fb_put_buf;
  logic [SLOT_W:0] lwt_fb_count, lwr_fb_count;
  logic [NUM_MMF-1:0] lwt_push, lwt_full, lwt_head_valid, lwt_pop;
  logic [NUM_MMF-1:0] lwr_push, lwr_full, lwr_head_valid, lwr_pop;
  logic [NUM_MMF-1:0][SLOT_W-1:0] lwt_push_buf, lwt_head_buf, lwr_push_buf, lwr_head_buf;
  logic [NUM_MMF-1:0][SLOT_W:0] lwt_qcount, lwr_qcount;
  logic lw_rx_valid, lw_rx_ready, lw_rx_sop, lw_rx_eop, lw_dec_valid, lw_dec_ready, lw_dec_sop, lw_dec_eop;
  logic [7:0] lw_rx_data, lw_dec_data;
  pkt_tag_t lw_dec_tag;
  logic lw_cam_wr_en, lw_cam_wr_valid;
  logic [CAM_AW-1:0] lw_cam_wr_addr;
  cam_key_t lw_cam_wr_key;
  logic pmm_wr, pmm_ready;
  logic [MMF_W-1:0] pmm_mmf;
  logic [7:0] pmm_data;

  mpa_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int ev_async = 0, ev_iso = 0, ev_unknown = 0, ev_chk_ok = 0, ev_chk_bad = 0, ev_crc = 0;
  int ev_stall = 0, ev_drop = 0, ev_tx_dmem = 0, ev_tx_mmf = 0, ev_tx_inet = 0, ev_tx_crc = 0;
  int ev_tx_bp = 0, ev_loop_ok = 0, ev_lwma = 0, ev_pmm = 0, ev_pmm_wait = 0, ev_lw_pf = 0;

  localparam cn_t CN_TCP = cn_t'(12'h320), CN_UDP = cn_t'(12'h540);
  localparam cn_t CN_STA = cn_t'(12'h061), CN_STB = cn_t'(12'h071);
  localparam int UDP_PAY = 100;
  localparam int UDP_LEN = 20 + 8 + UDP_PAY + 4;     // with CRC trailer

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- helpers
  function automatic cam_key_t K(input int lvl, input int pt, input int unsigned a);
    cam_key_t k; k.level = 2'(lvl); k.ptype = 8'(pt); k.addr = a; return k;
  endfunction

  task automatic cam_row(input int a, input cam_key_t k);
    @(negedge clk); cam_wr_en = 1; cam_wr_addr = CAM_AW'(a); cam_wr_valid = 1; cam_wr_key = k;
    @(negedge clk); cam_wr_en = 0;
  endtask

  task automatic ct_entry(input cn_t c, input conn_info_t i);
    @(negedge clk); ct_wr_en = 1; ct_wr_cn = c; ct_wr_info = i;
    @(negedge clk); ct_wr_en = 0;
  endtask

  task automatic rxh_read(input int byte_addr, output logic [31:0] d);
    @(negedge clk); rxh_en = 1; rxh_we = 0; rxh_addr = ($clog2(HMEM_BYTES)-2)'(byte_addr / 4);
    @(negedge clk); rxh_en = 0; d = rxh_rdata;
  endtask
  task automatic rxd_read(input int byte_addr, output logic [31:0] d);
    @(negedge clk); rxd_en = 1; rxd_we = 0; rxd_addr = ($clog2(DMEM_BYTES)-2)'(byte_addr / 4);
    @(negedge clk); rxd_en = 0; d = rxd_rdata;
  endtask

  // packet into the network side of the receiver, one byte per clock when ready
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

  // correct TCP checksum at offset 36 over bytes 20.. (no pseudo-header)
  function automatic bq_t tcp_pkt(input int pay, input int seed);
    bq_t p; shortint unsigned s;
    p = ip_packet(5, 6, 32'h0A000001, 32'h0A0000FE, 1234, 80, pay, seed);
    s = ~inet_sum(p, 20);
    p[36] = s[15:8]; p[37] = s[7:0];
    return p;
  endfunction

  function automatic bq_t udp_pkt(input int seed);
    bq_t p; int unsigned r;
    p = ip_packet(5, 17, 32'h0A000002, 32'h0A0000FE, 7000, 7001, UDP_PAY + 4, seed);
    r = ~crc32(p, 0, p.size() - 4);
    for (int k = 0; k < 4; k++) p[p.size() - 4 + k] = r[31 - 8*k -: 8];
    return p;
  endfunction

  // take one receive-queue entry and check it against the packet
  task automatic rx_check_async(input bq_t p, input int hl, input bit known, input cn_t cn,
                                input proto_e pr, input bit exp_ok, input bit release_it,
                                output int slot);
    logic [31:0] w; int base, nd;
    int guard = 0;
    while (!rxq_valid && guard < 5000) begin @(negedge clk); guard++; end
    chk(rxq_valid, "receive queue entry present");
    slot = rxq_slot;
    @(negedge clk); rxq_pop = 1; @(negedge clk); rxq_pop = 0;
    base = slot * HDR_SLOT;
    rxh_read(base, w);
    chk(w[11:0] == (known ? cn : 12'h0) && w[14] == known && proto_e'(w[13:12]) == (known ? pr : PROTO_UNKNOWN),
        $sformatf("receipt: cn %h known %0d", w[11:0], w[14]));
    chk(w[31:16] == p.size(), "receipt: length");
    rxh_read(base + 12, w);
    chk(w[0] == exp_ok, $sformatf("receipt: check ok = %0d, expected %0d", w[0], exp_ok));
    if (w[0]) ev_chk_ok++; else ev_chk_bad++;
    if (!known) ev_unknown++;
    for (int i = 0; i < hl && i < p.size(); i += 4) begin
      rxh_read(base + 16 + i, w);
      for (int k = 0; k < 4 && i + k < hl && i + k < p.size(); k++)
        chk(w[8*k +: 8] == p[i + k], $sformatf("header byte %0d", i + k));
    end
    nd = p.size() - hl;
    for (int i = 0; i < nd; i += 4) begin
      rxd_read(slot * DATA_BUF + i, w);
      for (int k = 0; k < 4 && i + k < nd; k++)
        chk(w[8*k +: 8] == p[hl + i + k], $sformatf("data byte %0d", i + k));
    end
    ev_async++;
    if (release_it) begin
      @(negedge clk); rx_release = 1; rx_release_slot = SLOT_W'(slot);
      @(negedge clk); rx_release = 0;
    end
  endtask

  // drain a receive multimedia FIFO and compare with expected bytes
  task automatic mm_drain(input int f, input bq_t exp, input string what);
    bq_t got;
    int idle = 0;
    while (idle < 50) begin
      @(negedge clk);
      mmr_rd = '0;
      if (!mmr_empty[f]) begin got.push_back(mmr_data[f]); mmr_rd[f] = 1; idle = 0; end
      else idle++;
    end
    @(negedge clk); mmr_rd = '0;
    chk(got == exp, $sformatf("%s: %0d bytes, expected %0d", what, got.size(), exp.size()));
  endtask

  task automatic mm_collect(input int f, output bq_t got);
    int idle;
    idle = 0; got.delete();
    while (idle < 50) begin
      @(negedge clk);
      mmr_rd = '0;
      if (!mmr_empty[f]) begin got.push_back(mmr_data[f]); mmr_rd[f] = 1; idle = 0; end
      else idle++;
    end
    @(negedge clk); mmr_rd = '0;
  endtask

  // is g an interleaving of a and b that keeps the order of each?
  function automatic bit is_merge(input bq_t g, input bq_t a, input bq_t b);
    bit ok[][];
    if (g.size() != a.size() + b.size()) return 0;
    ok = new[a.size() + 1];
    foreach (ok[i]) ok[i] = new[b.size() + 1];
    for (int i = 0; i <= a.size(); i++)
      for (int j = 0; j <= b.size(); j++)
        if (i == 0 && j == 0) ok[i][j] = 1;
        else ok[i][j] = (i > 0 && ok[i-1][j] && g[i+j-1] == a[i-1]) ||
                        (j > 0 && ok[i][j-1] && g[i+j-1] == b[j-1]);
    return ok[a.size()][b.size()];
  endfunction

  // ---------------------------------------------------------- transmit side
  byte unsigned txexp[$];
  int txlen[$];
  bq_t txgot[$];
  int tx_frames = 0;

  always @(negedge clk) tx_ready <= ($urandom_range(0, 4) != 0);
  initial begin
    bq_t cur;
    forever begin
      @(posedge clk);
      if (rst_n && tx_valid && !tx_ready) ev_tx_bp++;
      if (rst_n && tx_valid && tx_ready) begin
        if (tx_sop) cur.delete();
        cur.push_back(tx_data);
        if (tx_eop) begin txgot.push_back(cur); tx_frames++; end
      end
    end
  end

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

  task automatic send_cmd(input int slot, input cn_t cn, input int hl, input int dl,
                          input bit mm, input int f);
    send_cmd_t c;
    c.slot = SLOT_W'(slot); c.cn = cn; c.hdr_len = 8'(hl); c.data_len = OFF_W'(dl);
    c.from_mmf = mm; c.mmf = MMF_W'(f);
    @(negedge clk);
    while (sq_full) @(negedge clk);
    sq_push = 1; sq_cmd = c;
    @(negedge clk); sq_push = 0;
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    bq_t p, q, exp_a, exp_b;
    int slot;
    logic [31:0] w;
    int held[$];
    rx_valid = 0; rx_sop = 0; rx_eop = 0; rx_data = 0;
    cam_wr_en = 0; cam_wr_valid = 0; cam_wr_addr = 0; cam_wr_key = '0;
    ct_wr_en = 0; ct_wr_cn = '0; ct_wr_info = '0;
    rxh_en = 0; rxh_we = 0; rxh_addr = 0; rxh_wdata = 0;
    rxd_en = 0; rxd_we = 0; rxd_addr = 0; rxd_wdata = 0;
    txh_en = 0; txh_we = 0; txh_addr = 0; txh_wdata = 0;
    txd_en = 0; txd_we = 0; txd_addr = 0; txd_wdata = 0;
    rxq_pop = 0; rx_release = 0; rx_release_slot = 0;
    sq_push = 0; sq_cmd = '0; mmr_rd = 0; mmt_wr = 0; mmt_data = '0;
    pmm_wr = 0; pmm_mmf = 0; pmm_data = 0;
    lw_rx_valid = 0; lw_rx_sop = 0; lw_rx_eop = 0; lw_rx_data = 0; lw_dec_ready = 1;
    lw_cam_wr_en = 0; lw_cam_wr_valid = 0; lw_cam_wr_addr = 0; lw_cam_wr_key = '0;
    lwt_fb_get = 0; lwt_fb_put = 0; lwt_fb_put_buf = 0; lwt_push = 0; lwt_push_buf = '0; lwt_pop = 0;
    lwr_fb_get = 0; lwr_fb_put = 0; lwr_fb_put_buf = 0; lwr_push = 0; lwr_push_buf = '0; lwr_pop = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (NUM_SLOTS + 2) @(posedge clk);

    // 1. protocol address tree and connection table
    cam_row(0, K(0, 4, 0));
    cam_row(1, K(0, 5, 0));
    cam_row(2, K(1, 6, 32'h0A000001));
    cam_row(3, K(2, 6, {16'd1234, 16'd80}));
    cam_row(4, K(1, 17, 32'h0A000002));
    cam_row(5, K(2, 17, {16'd7000, 16'd7001}));
    cam_row(6, K(1, 5, 32'h0000_0101));
    cam_row(7, K(1, 5, 32'h0000_0202));
    ct_entry(CN_TCP, '{valid: 1, iso: 0, alg: CHK_INET16, hdr_len: 40, chk_start: 20, chk_off: 36, mmf: 0});
    ct_entry(CN_UDP, '{valid: 1, iso: 0, alg: CHK_CRC32, hdr_len: 28, chk_start: 0, chk_off: OFF_W'(UDP_LEN - 4), mmf: 0});
    ct_entry(CN_STA, '{valid: 1, iso: 1, alg: CHK_NONE, hdr_len: 8, chk_start: 0, chk_off: 0, mmf: 0});
    ct_entry(CN_STB, '{valid: 1, iso: 1, alg: CHK_NONE, hdr_len: 8, chk_start: 0, chk_off: 0, mmf: 1});

    // 2. receive traffic
    for (int n = 0; n < 6; n++) begin
      p = tcp_pkt(64 + 100 * n, n);                                   // good TCP
      net_send(p);
      rx_check_async(p, 40, 1, CN_TCP, PROTO_TCP, 1, 1, slot);
      p = udp_pkt(n);                                                 // good UDP, CRC
      net_send(p);
      rx_check_async(p, 28, 1, CN_UDP, PROTO_UDP, 1, 1, slot);
      ev_crc++;
      p = tcp_pkt(50, n + 100); p[60] ^= 8'h01;                       // corrupted TCP
      net_send(p);
      rx_check_async(p, 40, 1, CN_TCP, PROTO_TCP, 0, 1, slot);
      p = ip_packet(5, 6, 32'h0A000001, 32'h0A0000FE, 1234, 81, 30, n);   // unknown port
      net_send(p);
      rx_check_async(p, HDR_SLOT - 16, 0, 0, PROTO_UNKNOWN, 1, 1, slot);
    end
    // two interleaved ST-II streams go to FIFO 0 and FIFO 1
    exp_a.delete(); exp_b.delete();
    for (int n = 0; n < 8; n++) begin
      p = st2_packet(16'h0101, 40 + n, n);      for (int i = 8; i < p.size(); i++) exp_a.push_back(p[i]);
      net_send(p);
      q = st2_packet(16'h0202, 100 - n, n + 50); for (int i = 8; i < q.size(); i++) exp_b.push_back(q[i]);
      net_send(q);
    end
    p = st2_packet(16'h0303, 20, 9);            // unknown stream: stored as asynchronous
    net_send(p);
    rx_check_async(p, HDR_SLOT - 16, 0, 0, PROTO_UNKNOWN, 1, 1, slot);
    repeat (20) @(posedge clk);
    chk(cnt_rx_iso == 16, $sformatf("isochronous packets counted: %0d", cnt_rx_iso));
    ev_iso = cnt_rx_iso;
    mm_drain(0, exp_a, "stream 0101 in FIFO 0");
    mm_drain(1, exp_b, "stream 0202 in FIFO 1");

    // 2b. the protocol processor writes reliably received multimedia data
    //     into FIFO 0 while an ST-II stream fills the same FIFO: the DMA has
    //     priority, the processor waits, nothing is lost or reordered
    begin
      bq_t pb, sa, got;
      sa.delete(); pb.delete();
      for (int i = 0; i < 300; i++) pb.push_back(8'($urandom));
      fork
        for (int n = 0; n < 3; n++) begin
          p = st2_packet(16'h0101, 60 + n, n + 900);
          for (int i = 8; i < p.size(); i++) sa.push_back(p[i]);
          net_send(p);
        end
        for (int i = 0; i < pb.size(); i++) begin
          @(negedge clk);
          pmm_wr = 1; pmm_mmf = 0; pmm_data = pb[i];
          #1;
          while (!pmm_ready) begin ev_pmm_wait++; @(negedge clk); #1; end
          ev_pmm++;
        end
      join
      @(negedge clk); pmm_wr = 0;
      mm_collect(0, got);
      chk(is_merge(got, sa, pb), $sformatf("FIFO 0 holds stream and processor bytes in order (%0d of %0d+%0d)",
                                          got.size(), sa.size(), pb.size()));
    end

    // 3a. no slot released: after NUM_SLOTS packets the receive DMA stalls
    for (int n = 0; n < NUM_SLOTS; n++) begin
      p = tcp_pkt(20, n + 200);
      net_send(p);
    end
    begin
      int stall0;
      stall0 = cnt_rx_stall;
      fork
        net_send(tcp_pkt(20, 300));
        begin
          repeat (800) @(negedge clk);
          chk(cnt_rx_stall - stall0 >= 400, $sformatf("receive DMA stalls without free slot (%0d)", cnt_rx_stall - stall0));
          if (cnt_rx_stall > stall0) ev_stall++;
          for (int n = 0; n < NUM_SLOTS; n++) begin
            chk(rxq_valid, "queued");
            held.push_back(rxq_slot);
            @(negedge clk); rxq_pop = 1; @(negedge clk); rxq_pop = 0;
          end
          @(negedge clk); rx_release = 1; rx_release_slot = SLOT_W'(held[0]);
          @(negedge clk); rx_release = 0;
        end
      join
      rx_check_async(tcp_pkt(20, 300), 40, 1, CN_TCP, PROTO_TCP, 1, 1, slot);
      chk(slot == held[0], "the released slot is reused");
      for (int n = 1; n < held.size(); n++) begin
        @(negedge clk); rx_release = 1; rx_release_slot = SLOT_W'(held[n]);
        @(negedge clk); rx_release = 0;
      end
    end

    // 3b. overfill FIFO 1 without reading: data beyond MMF_DEPTH is dropped
    begin
      int sent, drop0;
      sent = 0; drop0 = cnt_mm_drop;
      exp_b.delete();
      for (int n = 0; n < 6; n++) begin
        p = st2_packet(16'h0202, 500, n);
        for (int i = 8; i < p.size(); i++) begin if (exp_b.size() < MMF_DEPTH) exp_b.push_back(p[i]); end
        sent += 500;
        net_send(p);
      end
      repeat (20) @(posedge clk);
      chk(cnt_mm_drop - drop0 == sent - MMF_DEPTH, $sformatf("dropped %0d of %0d bytes", cnt_mm_drop - drop0, sent));
      if (cnt_mm_drop > drop0) ev_drop++;
      mm_drain(1, exp_b, "FIFO 1 holds the first MMF_DEPTH bytes");
    end

    // 4. transmit: TCP from data memory, UDP from data memory, ST-II from FIFO 2
    for (int n = 0; n < 4; n++) begin
      bq_t hdr, pay, e; shortint unsigned s; int unsigned r;
      // TCP: header with zero checksum field in slot n, payload in buffer n
      p = ip_packet(5, 6, 32'h0A000001, 32'h0A0000FE, 1234, 80, 200 + 50 * n, n + 400);
      hdr = head(p, 40); pay.delete(); for (int i = 40; i < p.size(); i++) pay.push_back(p[i]);
      txh_write_bytes(n * HDR_SLOT, hdr);
      txd_write_bytes(n * DATA_BUF, pay);
      e = p; s = ~inet_sum(p, 20); e[36] = s[15:8]; e[37] = s[7:0];
      foreach (e[i]) txexp.push_back(e[i]); txlen.push_back(e.size());
      send_cmd(n, CN_TCP, 40, pay.size(), 0, 0);
      ev_tx_dmem++; ev_tx_inet++;
      // UDP with a CRC trailer placeholder, slot 8+n
      p = ip_packet(5, 17, 32'h0A000002, 32'h0A0000FE, 7000, 7001, UDP_PAY + 4, n + 500);
      hdr = head(p, 28); pay.delete(); for (int i = 28; i < p.size(); i++) pay.push_back(p[i]);
      txh_write_bytes((8 + n) * HDR_SLOT, hdr);
      txd_write_bytes((8 + n) * DATA_BUF, pay);
      e = p; r = ~crc32(p, 0, p.size() - 4);
      for (int k = 0; k < 4; k++) e[p.size() - 4 + k] = r[31 - 8*k -: 8];
      foreach (e[i]) txexp.push_back(e[i]); txlen.push_back(e.size());
      send_cmd(8 + n, CN_UDP, 28, pay.size(), 0, 0);
      ev_tx_crc++;
    end
    // ST-II: header from slot 15, payload written into transmit FIFO 2 by a device
    begin
      bq_t hdr, e;
      p = st2_packet(16'h0101, 300, 77);
      hdr = head(p, 8);
      txh_write_bytes(15 * HDR_SLOT, hdr);
      for (int i = 8; i < p.size(); i++) begin
        @(negedge clk); mmt_wr = 4'b0100; mmt_data[2] = p[i];
      end
      @(negedge clk); mmt_wr = 0;
      foreach (p[i]) txexp.push_back(p[i]); txlen.push_back(p.size());
      send_cmd(15, CN_STA, 8, 300, 1, 2);
      ev_tx_mmf++;
    end
    begin
      int guard;
      guard = 0;
      while (tx_frames < 9 && guard < 100000) begin @(negedge clk); guard++; end
    end
    chk(txgot.size() == 9, $sformatf("%0d frames transmitted", txgot.size()));
    foreach (txgot[f]) begin
      bit same;
      same = (txlen.size() > 0) && (txgot[f].size() == txlen[0]);
      for (int i = 0; i < txgot[f].size() && same; i++) same = (txgot[f][i] == txexp[i]);
      chk(same, $sformatf("transmitted frame %0d with its check sequence", f));
      if (txlen.size() > 0) begin
        repeat (txlen[0]) void'(txexp.pop_front());
        void'(txlen.pop_front());
      end
    end

    // 5. loop the transmitted TCP and UDP frames back into the receiver
    foreach (txgot[f]) begin
      if (f < 8) begin
        bit is_tcp;
        is_tcp = (txgot[f][9] == 6);
        net_send(txgot[f]);
        rx_check_async(txgot[f], is_tcp ? 40 : 28, 1, is_tcp ? CN_TCP : CN_UDP,
                       is_tcp ? PROTO_TCP : PROTO_UDP, 1, 1, slot);
        ev_loop_ok++;
      end
    end

    // 6. light-weight adapter host interface: an application sends three
    //    buffers on connection 2 (transmit memory), a decoder delivers two on
    //    connection 1 (receive memory); consumers return them
    begin
      int tb_bufs[$], rb_bufs[$];
      chk(lwt_fb_count == NUM_SLOTS && lwr_fb_count == NUM_SLOTS, "light-weight queues: all buffers free");
      for (int i = 0; i < 3; i++) begin
        @(negedge clk);
        chk(lwt_fb_valid, "transmit buffer available");
        tb_bufs.push_back(lwt_fb_buf);
        lwt_fb_get = 1; lwt_push = 4'b0100; lwt_push_buf[2] = lwt_fb_buf;
        if (i < 2) begin
          chk(lwr_fb_valid, "receive buffer available");
          rb_bufs.push_back(lwr_fb_buf);
          lwr_fb_get = 1; lwr_push = 4'b0010; lwr_push_buf[1] = lwr_fb_buf;
        end else begin lwr_fb_get = 0; lwr_push = 0; end
      end
      @(negedge clk); lwt_fb_get = 0; lwt_push = 0; lwr_fb_get = 0; lwr_push = 0;
      @(negedge clk);
      chk(lwt_qcount[2] == 3 && lwr_qcount[1] == 2 && lwt_fb_count == NUM_SLOTS - 3, "queue levels");
      foreach (tb_bufs[i]) begin
        chk(lwt_head_valid[2] && lwt_head_buf[2] == tb_bufs[i], "send queue order");
        lwt_pop = 4'b0100; lwt_fb_put = 1; lwt_fb_put_buf = lwt_head_buf[2];
        if (i < rb_bufs.size()) begin
          chk(lwr_head_valid[1] && lwr_head_buf[1] == rb_bufs[i], "receive queue order");
          lwr_pop = 4'b0010; lwr_fb_put = 1; lwr_fb_put_buf = lwr_head_buf[1];
        end else begin lwr_pop = 0; lwr_fb_put = 0; end
        @(negedge clk);
        ev_lwma++;
      end
      lwt_pop = 0; lwt_fb_put = 0; lwr_pop = 0; lwr_fb_put = 0;
      @(negedge clk);
      chk(lwt_fb_count == NUM_SLOTS && lwr_fb_count == NUM_SLOTS && lwt_head_valid == 0 && lwr_head_valid == 0,
          "light-weight queues: all buffers returned");
    end

    // 7. light-weight adapter receive side: its own protocol filter tags an
    //    ST-II packet of a known stream and a TCP packet of an unknown one
    begin
      cam_key_t lk[2];
      bq_t pa, pt, ga;
      pkt_tag_t ta[$];
      lk[0] = K(0, 5, 0); lk[1] = K(1, 5, 32'h0000_0404);
      for (int r = 0; r < 2; r++) begin
        @(negedge clk); lw_cam_wr_en = 1; lw_cam_wr_addr = CAM_AW'(r + 8); lw_cam_wr_valid = 1; lw_cam_wr_key = lk[r];
      end
      @(negedge clk); lw_cam_wr_en = 0;
      pa = st2_packet(16'h0404, 40, 5);
      pt = tcp_pkt(30, 6);
      fork
        begin
          for (int n = 0; n < 2; n++) begin
            bq_t q;
            q = (n == 0) ? pa : pt;
            for (int i = 0; i < q.size(); i++) begin
              @(negedge clk);
              lw_rx_valid = 1; lw_rx_data = q[i]; lw_rx_sop = (i == 0); lw_rx_eop = (i == q.size() - 1);
              #1;
              while (!lw_rx_ready) begin @(negedge clk); #1; end
            end
          end
          @(negedge clk); lw_rx_valid = 0; lw_rx_sop = 0; lw_rx_eop = 0;
        end
        begin
          int guard;
          guard = 0;
          while (ta.size() < 2 && guard < 2000) begin
            @(posedge clk);
            guard++;
            if (lw_dec_valid && lw_dec_ready) begin
              ga.push_back(lw_dec_data);
              if (lw_dec_eop) ta.push_back(lw_dec_tag);
            end
          end
        end
      join
      chk(ta.size() == 2, "light-weight adapter filter delivered two frames");
      if (ta.size() == 2) begin
        chk(ta[0].known && ta[0].cn == cn_t'({4'h0, 4'h9, 4'h8}) && ta[0].proto == PROTO_ST2,
            $sformatf("known ST-II stream tagged CN %h", ta[0].cn));
        chk(!ta[1].known && ta[1].cn == 0, "TCP packet of unknown connection tagged unknown");
        if (ta[0].known) ev_lw_pf++;
      end
      chk(ga.size() == pa.size() + pt.size(), "frames passed to the decoder whole");
    end

    // every mechanism must have happened
    chk(ev_async > 0,   "asynchronous packets stored");
    chk(ev_iso > 0,     "isochronous packets to multimedia FIFOs");
    chk(ev_unknown > 0, "unknown connections");
    chk(ev_chk_ok > 0,  "good check sequences");
    chk(ev_chk_bad > 0, "bad check sequence detected");
    chk(ev_crc > 0,     "CRC-32 connection received");
    chk(ev_stall > 0,   "receive stall for want of a slot");
    chk(ev_drop > 0,    "multimedia FIFO overflow drop");
    chk(ev_tx_dmem > 0 && ev_tx_mmf > 0, "transmit from data memory and from a multimedia FIFO");
    chk(ev_tx_inet > 0 && ev_tx_crc > 0, "checksum and CRC inserted on transmit");
    chk(ev_tx_bp > 0,   "network back-pressure on transmit");
    chk(ev_loop_ok > 0, "looped-back frames verified");
    chk(ev_lwma > 0,    "light-weight adapter buffer queues used");
    chk(ev_pmm > 0,     "processor writes into a multimedia FIFO");
    chk(ev_lw_pf > 0,   "light-weight adapter protocol filter classified a frame");
    chk(ev_pmm_wait > 0, "processor write waits for the receive DMA");
    $display("mechanisms: async=%0d iso=%0d unknown=%0d chk_ok=%0d chk_bad=%0d crc=%0d stall=%0d drop=%0d tx_dmem=%0d tx_mmf=%0d tx_inet=%0d tx_crc=%0d tx_bp=%0d loop=%0d lwma=%0d pmm=%0d pmm_wait=%0d lw_pf=%0d",
             ev_async, ev_iso, ev_unknown, ev_chk_ok, ev_chk_bad, ev_crc, ev_stall, ev_drop,
             ev_tx_dmem, ev_tx_mmf, ev_tx_inet, ev_tx_crc, ev_tx_bp, ev_loop_ok, ev_lwma, ev_pmm, ev_pmm_wait, ev_lw_pf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

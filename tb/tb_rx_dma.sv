// tb_rx_dma: self-checking test of the receive DMA unit.
// Models around it: connection table, free slot queue, header and data
// memories (write capture) and multimedia FIFOs whose full flags the test
// controls.  Sends asynchronous packets of known and unknown connections and
// isochronous packets; checks the header and data placement, the receipt
// information, the receive queue, the bytes written to each multimedia FIFO,
// dropping when a FIFO is full, and the stall when no slot is free.
//
// The traffic, the reference models and the expected values are this
// testbench's own; the behaviour checked is the one described in the module's
// header.
module tb_rx_dma;
  import mpa_pkg::*;
  import tb_pkt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_sop, in_eop, in_chk_ok;
  logic [7:0] in_data;
  pkt_tag_t in_tag;
  logic [31:0] in_chk;
  cn_t ct_cn;
  conn_info_t ct_info;
  logic free_valid, free_pop, rxq_push;
  logic [SLOT_W-1:0] free_slot, rxq_slot;
  logic hm_en, hm_we, dm_en, dm_we;
  logic [$clog2(HMEM_BYTES)-1:0] hm_addr;
  logic [$clog2(DMEM_BYTES)-1:0] dm_addr;
  logic [7:0] hm_wdata, dm_wdata, mmf_wdata;
  logic [NUM_MMF-1:0] mmf_wr, mmf_full;
  logic [31:0] cnt_async, cnt_iso, cnt_mm_drop, cnt_stall;

  byte unsigned hmem[HMEM_BYTES];
  byte unsigned dmem[DMEM_BYTES];
  byte unsigned mmq[NUM_MMF][$];
  conn_info_t tbl[4];
  int freeq[$];
  int rxq[$];
  int checks = 0, failures = 0;
  int exp_drop = 0;

  always #5 clk = ~clk;
  rx_dma dut (.*);

  always_comb ct_info = tbl[ct_cn[1:0]];
  assign free_valid = freeq.size() > 0;
  assign free_slot  = free_valid ? SLOT_W'(freeq[0]) : '0;

  always @(posedge clk) begin
    if (free_pop) void'(freeq.pop_front());
    if (hm_en && hm_we) hmem[hm_addr] = hm_wdata;
    if (dm_en && dm_we) dmem[dm_addr] = dm_wdata;
    for (int f = 0; f < NUM_MMF; f++) if (mmf_wr[f]) begin
      if (mmf_full[f]) begin failures++; $display("FAIL write to full FIFO"); end
      mmq[f].push_back(mmf_wdata);
    end
    if (rxq_push) rxq.push_back(rxq_slot);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input bq_t p, input pkt_tag_t t, input logic [31:0] c, input bit ok);
    for (int i = 0; i < p.size(); i++) begin
      @(negedge clk);
      in_valid = 1; in_data = p[i]; in_sop = (i == 0); in_eop = (i == p.size() - 1);
      in_tag = t; in_chk = (i == p.size() - 1) ? c : 32'hDEAD_BEEF; in_chk_ok = ok;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      if ($urandom_range(0, 4) == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  function automatic int unsigned rd32(input int a);
    return {hmem[a+3], hmem[a+2], hmem[a+1], hmem[a]};
  endfunction

  // check one asynchronous packet's placement
  task automatic check_async(input bq_t p, input pkt_tag_t t, input int hl, input logic [31:0] c,
                             input bit ok, input chk_alg_e alg);
    int s, base; int nd;
    repeat (20) @(posedge clk);
    chk(rxq.size() == 1, "one receive-queue entry");
    if (rxq.size() == 0) return;
    s = rxq.pop_front();
    base = s * HDR_SLOT;
    nd = p.size() - hl; if (nd < 0) nd = 0; if (nd > DATA_BUF) nd = DATA_BUF;
    for (int i = 0; i < hl && i < p.size(); i++) chk(hmem[base + 16 + i] == p[i], $sformatf("header byte %0d slot %0d got %h exp %h len %0d", i, s, hmem[base+16+i], p[i], p.size()));
    for (int i = 0; i < nd; i++) chk(dmem[s * DATA_BUF + i] == p[hl + i], $sformatf("data byte %0d", i));
    chk(rd32(base) == {16'(p.size()), 1'b0, t.known, t.proto, t.cn}, "receipt word 0");
    chk(rd32(base + 4) == {16'(nd), 16'(p.size() < hl ? p.size() : hl)}, "receipt word 1");
    chk(rd32(base + 8) == c, "receipt word 2: check sequence");
    chk(rd32(base + 12) == {29'h0, alg, ok}, "receipt word 3");
    freeq.push_back(s);
  endtask

  initial begin
    bq_t p; pkt_tag_t t; int n_async = 0, n_iso = 0;
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = 0; in_tag = '0; in_chk = 0; in_chk_ok = 0;
    mmf_full = '0;
    for (int i = 0; i < NUM_SLOTS; i++) freeq.push_back(i);
    tbl[0] = '0;
    tbl[1] = '{valid: 1, iso: 0, alg: CHK_INET16, hdr_len: 40, chk_start: 20, chk_off: 36, mmf: 0};
    tbl[2] = '{valid: 1, iso: 1, alg: CHK_NONE,   hdr_len: 8,  chk_start: 0,  chk_off: 0,  mmf: 2};
    tbl[3] = '{valid: 1, iso: 1, alg: CHK_NONE,   hdr_len: 8,  chk_start: 0,  chk_off: 0,  mmf: 1};
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      logic [31:0] c; bit ok;
      c = $urandom; ok = $urandom_range(0, 1);
      case (n % 4)
        0: begin   // asynchronous TCP
          p = ip_packet(5, 6, 1, 2, 3, 4, $urandom_range(0, 200), n);
          t = '{cn: 1, known: 1, proto: PROTO_TCP};
          send(p, t, c, ok); n_async++;
          check_async(p, t, 40, c, ok, CHK_INET16);
        end
        1: begin   // unknown connection: treated as asynchronous
          p = ip_packet(5, 6, 9, 9, 9, 9, $urandom_range(0, 200), n);
          t = '{cn: 0, known: 0, proto: PROTO_UNKNOWN};
          send(p, t, c, ok); n_async++;
          check_async(p, t, HDR_SLOT - 16, c, ok, CHK_NONE);
        end
        default: begin   // isochronous ST-II to FIFO 2 or 1
          int cn, f;
          cn = (n % 4 == 2) ? 2 : 3;
          f = tbl[cn].mmf;
          p = st2_packet(16'h0101, $urandom_range(1, 100), n);
          t = '{cn: cn_t'(cn), known: 1, proto: PROTO_ST2};
          mmq[f].delete();
          send(p, t, c, ok); n_iso++;
          repeat (3) @(posedge clk);
          chk(mmq[f].size() == p.size() - 8, "isochronous data length");
          for (int i = 8; i < p.size(); i++) chk(mmq[f][i - 8] == p[i], "isochronous data byte");
          chk(rxq.size() == 0, "isochronous packet not queued");
        end
      endcase
    end
    chk(cnt_async == n_async && cnt_iso == n_iso, "packet counters");
    // multimedia FIFO full: the whole data part is dropped and counted
    mmq[2].delete();
    mmf_full[2] = 1;
    p = st2_packet(16'h0101, 50, 7);
    send(p, '{cn: 2, known: 1, proto: PROTO_ST2}, 0, 1);
    repeat (3) @(posedge clk);
    chk(mmq[2].size() == 0, "nothing written to a full FIFO");
    chk(cnt_mm_drop == 50, $sformatf("drop counter %0d", cnt_mm_drop));
    mmf_full[2] = 0;
    // no free slot: the DMA stalls on the first byte, then continues
    begin
      int saved[$]; int stall0;
      saved = freeq; freeq.delete();
      p = ip_packet(5, 6, 1, 2, 3, 4, 20, 3);
      t = '{cn: 1, known: 1, proto: PROTO_TCP};
      stall0 = cnt_stall;
      fork
        send(p, t, 32'h1234, 1);
        begin
          repeat (30) @(posedge clk);
          chk(cnt_stall - stall0 >= 25, "stall cycles counted");
          chk(rxq.size() == 0, "nothing stored while stalled");
          @(negedge clk); freeq = saved;
        end
      join
      check_async(p, t, 40, 32'h1234, 1, CHK_INET16);
    end
    // throughput: 1 byte per clock for an isochronous packet
    begin
      int t0, t1;
      p = st2_packet(16'h0101, 200, 1);
      
      for (int i = 0; i < p.size(); i++) begin
        @(negedge clk);
        in_valid = 1; in_data = p[i]; in_sop = (i == 0); in_eop = (i == p.size() - 1);
        in_tag = '{cn: 2, known: 1, proto: PROTO_ST2};
        if (i == 0) t0 = $time;
        #1; while (!in_ready) begin @(negedge clk); #1; end
      end
      @(negedge clk);
      in_valid = 0;
      t1 = $time;
      chk((t1 - t0) / 10 == p.size(), $sformatf("one byte per clock (%0d clocks for %0d bytes)", (t1 - t0) / 10, p.size()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

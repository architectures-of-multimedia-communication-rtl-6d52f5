// tb_tx_dma: self-checking test of the transmit DMA unit.
// Models around it: send queue, header and data memories with one-clock
// reads, and transmit multimedia FIFOs that sometimes run empty.  Commands
// take payload from data memory or from a multimedia FIFO.  Checks every
// gathered packet (header then payload), its CN, sop/eop, the completion
// pulse with the slot, and one byte per clock when nothing stalls.
//
// The traffic, the reference models and the expected values are this
// testbench's own; the behaviour checked is the one described in the module's
// header.
module tb_tx_dma;
  import mpa_pkg::*;
  import tb_pkt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sq_valid, sq_pop, hm_en, dm_en, out_valid, out_ready, out_sop, out_eop, done;
  send_cmd_t sq_cmd;
  logic [$clog2(HMEM_BYTES)-1:0] hm_addr;
  logic [$clog2(DMEM_BYTES)-1:0] dm_addr;
  logic [7:0] hm_rdata, dm_rdata, out_data;
  logic [NUM_MMF-1:0] mmf_rd, mmf_empty;
  logic [NUM_MMF-1:0][7:0] mmf_rdata;
  cn_t out_cn;
  logic [SLOT_W-1:0] done_slot;

  byte unsigned hmem[HMEM_BYTES];
  byte unsigned dmem[DMEM_BYTES];
  byte unsigned mmq[NUM_MMF][$];
  send_cmd_t sq[$];
  // expected packets, flattened: all bytes in one queue, lengths and CNs apart
  byte unsigned expb[$];
  int expl[$];
  cn_t expc[$];
  int dones[$];
  int checks = 0, failures = 0;
  bit bp = 1;

  always #5 clk = ~clk;
  tx_dma dut (.*);

  // show-ahead views of the queue models, refreshed every nanosecond half a
  // nanosecond away from the clock edges
  initial begin
    #0.5;
    forever begin
    sq_valid = sq.size() > 0;
    sq_cmd   = sq_valid ? sq[0] : '0;
    for (int f = 0; f < NUM_MMF; f++) begin
      mmf_empty[f] = mmq[f].size() == 0;
      mmf_rdata[f] = mmf_empty[f] ? 8'h00 : mmq[f][0];
    end
    #1;
    end
  end
  always @(posedge clk) begin
    if (hm_en) hm_rdata <= hmem[hm_addr];
    if (dm_en) dm_rdata <= dmem[dm_addr];
  end
  always @(negedge clk) out_ready <= bp ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // queue updates on the clock edge; show-ahead outputs follow
  always @(posedge clk) begin
    if (sq_pop) void'(sq.pop_front());
    for (int f = 0; f < NUM_MMF; f++) if (mmf_rd[f]) void'(mmq[f].pop_front());
    if (done) dones.push_back(done_slot);
  end

  initial begin
    bq_t got; cn_t c0;
    forever begin
      @(posedge clk);
      if (rst_n && out_valid && out_ready) begin
        if (out_sop) begin got.delete(); c0 = out_cn; end
        chk(out_cn == c0, "cn stable");
        got.push_back(out_data);
        if (out_eop) begin
          chk(expl.size() > 0, "packet expected");
          if (expl.size() > 0) begin
            bit same;
            same = (got.size() == expl[0]);
            for (int i = 0; i < got.size() && same; i++) begin
              same = (got[i] == expb[i]);
              if (!same) $display("first difference at byte %0d: %h vs %h", i, got[i], expb[i]);
            end
            chk(same, $sformatf("packet bytes (%0d vs %0d)", got.size(), expl[0]));
            chk(c0 == expc[0], "cn");
            repeat (expl[0]) void'(expb.pop_front());
            void'(expl.pop_front());
            void'(expc.pop_front());
          end
        end
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // build one command and its expected packet
  task automatic post(input int slot, input int hl, input int dl, input bit mm, input int f);
    send_cmd_t c; cn_t cn;
    for (int i = 0; i < hl; i++) begin hmem[slot * HDR_SLOT + i] = 8'($urandom); expb.push_back(hmem[slot * HDR_SLOT + i]); end
    for (int i = 0; i < dl; i++) begin
      byte unsigned b = 8'($urandom);
      if (mm) mmq[f].push_back(b); else dmem[slot * DATA_BUF + i] = b;
      expb.push_back(b);
    end
    cn = cn_t'($urandom);
    c.slot = SLOT_W'(slot); c.cn = cn; c.hdr_len = 8'(hl); c.data_len = OFF_W'(dl);
    c.from_mmf = mm; c.mmf = MMF_W'(f);
    expl.push_back(hl + dl); expc.push_back(cn);
    @(negedge clk);
    sq.push_back(c);
  endtask

  initial begin
    int t0, t1;
    bq_t hold;
    for (int i = 0; i < HMEM_BYTES; i++) hmem[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 80; n++) begin
      int slot; bit mm;
      slot = n % NUM_SLOTS;
      mm = (n % 3 == 0);
      post(slot, $urandom_range(1, 100), $urandom_range(0, 300), mm, n % NUM_MMF);
      wait (expl.size() == 0);
      repeat (3) @(posedge clk);
      chk(dones.size() == 1 && dones[0] == slot, "completion pulse with slot");
      dones.delete();
    end
    // multimedia FIFO runs dry mid-packet: the DMA waits for data
    post(3, 20, 100, 1, 2);
    hold = mmq[2]; mmq[2] = hold[0:29];
    repeat (200) @(posedge clk);
    chk(expl.size() == 1, "waits while the multimedia FIFO is empty");
    @(negedge clk); mmq[2] = {mmq[2], hold[30:$]};
    wait (expl.size() == 0);
    // full rate: no back-pressure, data memory payload
    bp = 0;
    repeat (5) @(posedge clk);
    post(5, 40, 1000, 0, 0);
    @(posedge clk); t0 = $time;
    wait (expl.size() == 0);
    t1 = $time;
    chk((t1 - t0) / 10 <= 1040 + 4, $sformatf("about one byte per clock (%0d clocks for 1040 bytes)", (t1 - t0) / 10));
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

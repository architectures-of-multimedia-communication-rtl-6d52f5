// tb_check_gen: self-checking test of the receive checksum/CRC generator.
// Connections use the 16-bit one's-complement sum (even and odd start
// offsets), CRC-32, or no check; packets are made correct or corrupted.
// Checks pass-through of bytes and tag, the check value and ok flag on the
// last byte against reference models, and the one-clock latency.
//
// The traffic, the reference models and the expected values are this
// testbench's own; the behaviour checked is the one described in the module's
// header.
module tb_check_gen;
  import mpa_pkg::*;
  import tb_pkt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_sop, in_eop, out_valid, out_ready, out_sop, out_eop, out_chk_ok;
  logic [7:0] in_data, out_data;
  pkt_tag_t in_tag, out_tag;
  logic [31:0] out_chk;
  cn_t ct_cn;
  conn_info_t ct_info;
  conn_info_t table_m[4];
  int checks = 0, failures = 0;
  typedef struct { bq_t p; pkt_tag_t tag; logic [31:0] chk; bit ok; } exp_t;
  exp_t expq[$];
  int n_ok = 0, n_bad = 0;

  always #5 clk = ~clk;
  check_gen dut (.*);
  always_comb ct_info = table_m[ct_cn[1:0]];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t got; pkt_tag_t t0;
    forever begin
      @(posedge clk);
      if (rst_n && out_valid && out_ready) begin
        if (out_sop) begin got.delete(); t0 = out_tag; end
        got.push_back(out_data);
        if (out_eop) begin
          chk(got == expq[0].p, "bytes");
          chk(t0 == expq[0].tag, "tag");
          chk(out_chk == expq[0].chk, $sformatf("check %h expected %h", out_chk, expq[0].chk));
          chk(out_chk_ok == expq[0].ok, "ok flag");
          if (out_chk_ok) n_ok++; else n_bad++;
          void'(expq.pop_front());
        end
      end
    end
  end
  always @(negedge clk) out_ready <= ($urandom_range(0, 4) != 0);

  initial begin
    bq_t p; pkt_tag_t t; exp_t e;
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = 0; in_tag = '0;
    table_m[0] = '0;                                                     // invalid entry
    table_m[1] = '{valid: 1, iso: 0, alg: CHK_INET16, hdr_len: 40, chk_start: 20, chk_off: 36, mmf: 0};
    table_m[2] = '{valid: 1, iso: 0, alg: CHK_CRC32,  hdr_len: 28, chk_start: 0,  chk_off: 0,  mmf: 0};
    table_m[3] = '{valid: 1, iso: 0, alg: CHK_INET16, hdr_len: 28, chk_start: 21, chk_off: 0,  mmf: 0};
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int c, len; bit corrupt;
      c = $urandom_range(0, 3);
      len = $urandom_range(30, 120);
      corrupt = ($urandom_range(0, 3) == 0);
      p.delete();
      for (int i = 0; i < len; i++) p.push_back(8'($urandom));
      t = '0; t.cn = cn_t'(c); t.known = ($urandom_range(0, 7) != 0); t.proto = PROTO_TCP;
      // make the packet correct for its connection
      if (c == 1 || c == 3) begin
        shortint unsigned s;
        int st = table_m[c].chk_start;
        p[st] = 0; p[st + 1] = 0;
        s = ~inet_sum(p, st);
        p[st] = s[15:8]; p[st + 1] = s[7:0];
      end else if (c == 2) begin
        int unsigned r;
        r = ~crc32(p, 0, len - 4);
        for (int k = 0; k < 4; k++) p[len - 4 + k] = r[31 - 8*k -: 8];
      end
      if (corrupt) p[len / 2] ^= 8'h10;
      e.p = p; e.tag = t;
      if (!t.known || c == 0) begin e.chk = 0; e.ok = 1; end
      else if (c == 2) begin e.chk = crc32(p, 0, len); e.ok = (e.chk == 32'hC704DD7B); end
      else begin e.chk = {16'h0, inet_sum(p, table_m[c].chk_start)}; e.ok = (e.chk == 32'hFFFF); end
      expq.push_back(e);
      for (int i = 0; i < len; i++) begin
        in_valid = 1; in_data = p[i]; in_sop = (i == 0); in_eop = (i == len - 1); in_tag = t;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1;
        if ($urandom_range(0, 5) == 0) begin in_valid = 0; @(posedge clk); #1; end
      end
      in_valid = 0;
    end
    repeat (50) @(posedge clk);
    chk(expq.size() == 0, "all packets out");
    chk(n_ok > 0 && n_bad > 0, "both good and bad packets seen");
    // latency: one clock from input to output with ready high
    @(negedge clk);
    in_valid = 1; in_sop = 1; in_eop = 1; in_data = 8'h5A; in_tag = '0;
    expq.push_back('{'{8'h5A}, '0, 0, 1});
    force out_ready = 1'b1;
    @(negedge clk); in_valid = 0;
    chk(out_valid && out_data == 8'h5A, "one clock latency");
    @(negedge clk); release out_ready;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

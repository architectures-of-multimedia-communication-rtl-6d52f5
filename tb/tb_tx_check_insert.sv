// tb_tx_check_insert: self-checking test of the transmit checksum/CRC
// generator.  Connections use the one's-complement sum (check field inside
// the header, even and odd start offsets), a CRC-32 trailer, no check, and an
// invalid entry.  Each frame leaving the unit must equal the input frame with
// the check sequence from the reference model stored at the connection's
// offset; a frame with the sum inserted must sum to FFFF, a CRC frame must
// leave the CRC-32 residue.  Also checks that a frame of n bytes takes 2n
// clocks (fill, then send), and that a frame longer than the buffer leaves
// cut to the buffer size.
//
// The traffic, the reference models and the expected values are this
// testbench's own; the behaviour checked is the one described in the module's
// header.
module tb_tx_check_insert;
  import mpa_pkg::*;
  import tb_pkt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_sop, in_eop, out_valid, out_ready, out_sop, out_eop;
  logic [7:0] in_data, out_data;
  cn_t in_cn, ct_cn;
  conn_info_t ct_info;
  conn_info_t tbl[5];
  byte unsigned expb[$];
  int expl[$];
  int checks = 0, failures = 0;
  bit bp = 1;
  int n_inet = 0, n_crc = 0;

  always #5 clk = ~clk;
  localparam int BUFB = 1024;
  tx_check_insert #(.BUF_BYTES(BUFB)) dut (.*);
  always_comb ct_info = tbl[ct_cn % 5];
  always @(negedge clk) out_ready <= bp ? ($urandom_range(0, 3) != 0) : 1'b1;

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

  initial begin
    bq_t got;
    forever begin
      @(posedge clk);
      if (rst_n && out_valid && out_ready) begin
        if (out_sop) got.delete();
        got.push_back(out_data);
        if (out_eop) begin
          bit same;
          same = expl.size() > 0 && got.size() == expl[0];
          for (int i = 0; i < got.size() && same; i++) same = (got[i] == expb[i]);
          chk(same, $sformatf("frame with inserted check (%0d bytes)", got.size()));
          if (expl.size() > 0) begin
            repeat (expl[0]) void'(expb.pop_front());
            void'(expl.pop_front());
          end
        end
      end
    end
  end

  task automatic send(input bq_t p, input int c);
    for (int i = 0; i < p.size(); i++) begin
      @(negedge clk);
      in_valid = 1; in_data = p[i]; in_sop = (i == 0); in_eop = (i == p.size() - 1); in_cn = cn_t'(c);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      if (bp && $urandom_range(0, 4) == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    bq_t p, e;
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = 0; in_cn = '0;
    tbl[0] = '{valid: 1, iso: 0, alg: CHK_INET16, hdr_len: 40, chk_start: 20, chk_off: 36, mmf: 0};
    tbl[1] = '{valid: 1, iso: 0, alg: CHK_INET16, hdr_len: 28, chk_start: 21, chk_off: 27, mmf: 0};
    tbl[2] = '{valid: 1, iso: 0, alg: CHK_CRC32,  hdr_len: 8,  chk_start: 0,  chk_off: 0,  mmf: 0};
    tbl[3] = '{valid: 1, iso: 1, alg: CHK_NONE,   hdr_len: 8,  chk_start: 0,  chk_off: 0,  mmf: 0};
    tbl[4] = '{valid: 0, iso: 0, alg: CHK_CRC32,  hdr_len: 8,  chk_start: 0,  chk_off: 0,  mmf: 0};
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int c, len;
      c = n % 5;
      len = $urandom_range(44, 600);
      p.delete();
      for (int i = 0; i < len; i++) p.push_back(8'($urandom));
      e = p;
      if (c == 0 || c == 1) begin
        shortint unsigned s;
        int st, off;
        st = tbl[c].chk_start; off = tbl[c].chk_off;
        p[off] = 0; p[off + 1] = 0; e = p;
        s = ~inet_sum(p, st);
        e[off] = s[15:8]; e[off + 1] = s[7:0];
        chk(inet_sum(e, st) == 16'hFFFF, "model: inserted sum verifies");
        n_inet++;
      end else if (c == 2) begin
        int unsigned r;
        tbl[2].chk_off = OFF_W'(len - 4);
        r = ~crc32(p, 0, len - 4);
        for (int k = 0; k < 4; k++) e[len - 4 + k] = r[31 - 8*k -: 8];
        chk(crc32(e, 0, len) == 32'hC704DD7B, "model: CRC residue");
        n_crc++;
      end
      foreach (e[i]) expb.push_back(e[i]);
      expl.push_back(len);
      send(p, c);
    end
    wait (expl.size() == 0);
    // timing: 2n clocks per n-byte frame without back-pressure
    bp = 0;
    repeat (10) @(posedge clk);
    begin
      int t0, t1;
      p.delete();
      for (int i = 0; i < 100; i++) p.push_back(8'(i));
      foreach (p[i]) expb.push_back(p[i]);
      expl.push_back(100);
      @(negedge clk); t0 = $time;
      send(p, 3);
      while (!(out_valid && out_eop)) @(negedge clk);
      t1 = $time;
      chk((t1 - t0) / 10 == 200, $sformatf("fill plus send takes %0d clocks for 100 bytes", (t1 - t0) / 10));
    end
    // a frame longer than the buffer leaves cut to the buffer size
    repeat (10) @(posedge clk);
    p.delete();
    for (int i = 0; i < BUFB + 50; i++) p.push_back(8'($urandom));
    for (int i = 0; i < BUFB; i++) expb.push_back(p[i]);
    expl.push_back(BUFB);
    send(p, 3);
    wait (expl.size() == 0);
    repeat (5) @(posedge clk);
    chk(expl.size() == 0, "all frames out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

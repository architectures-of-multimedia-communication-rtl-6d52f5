// tb_pf_mask_gen: self-checking test of the mask generator.  Streams IP/TCP
// (with and without IP options), IP/UDP, IP with another protocol, ST-II,
// an unknown network protocol and a truncated IP packet, with idle clocks
// between bytes, and compares the issued search masks with the expected
// list per packet, including the cycle of the last request.
//
// The traffic, the reference models and the expected values are this
// testbench's own; the behaviour checked is the one described in the module's
// header.
module tb_pf_mask_gen;
  import mpa_pkg::*;
  import tb_pkt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_fire, in_sop, in_eop;
  logic [7:0] in_data;
  logic req_valid, req_last, req_abort;
  cam_key_t req_key;
  proto_e req_proto;
  int checks = 0, failures = 0;

  typedef struct { cam_key_t key; bit last; bit abort; proto_e proto; } req_t;
  req_t got[$];

  always #5 clk = ~clk;
  pf_mask_gen dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (req_valid) got.push_back('{req_key, req_last, req_abort, req_proto});

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input bq_t p, input int last_req_byte);
    int last_cycle_ok;
    last_cycle_ok = 0;
    for (int i = 0; i < p.size(); i++) begin
      @(negedge clk);
      in_fire = 1; in_data = p[i]; in_sop = (i == 0); in_eop = (i == p.size() - 1);
      #1;
      if (req_valid && req_last) chk(i == last_req_byte, $sformatf("last request at byte %0d, expected %0d", i, last_req_byte));
      @(negedge clk);
      in_fire = 0; in_sop = 0; in_eop = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask

  function automatic cam_key_t K(input int lvl, input int pt, input int unsigned a);
    cam_key_t k; k.level = 2'(lvl); k.ptype = 8'(pt); k.addr = a; return k;
  endfunction

  task automatic expect_reqs(input req_t exp[$], input string name);
    @(negedge clk);
    chk(got.size() == exp.size(), $sformatf("%s: %0d requests, expected %0d", name, got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++) begin
      chk(got[i].last == exp[i].last && got[i].abort == exp[i].abort, $sformatf("%s req %0d flags", name, i));
      if (!exp[i].abort) chk(got[i].key == exp[i].key, $sformatf("%s req %0d key %h exp %h", name, i, got[i].key, exp[i].key));
      if (exp[i].last && !exp[i].abort) chk(got[i].proto == exp[i].proto, $sformatf("%s proto", name));
    end
    got.delete();
  endtask

  initial begin
    bq_t p;
    in_fire = 0; in_sop = 0; in_eop = 0; in_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int rep = 0; rep < 20; rep++) begin
      int unsigned src;
      shortint unsigned sp, dp;
      int ihl;
      src = $urandom; sp = shortint'($urandom); dp = shortint'($urandom);
      ihl = 5 + rep % 3;
      // TCP
      p = ip_packet(ihl, 6, src, 32'h0A000001, sp, dp, rep * 5, rep);
      send(p, ihl * 4 + 3);
      expect_reqs('{'{K(0, 4, 0), 0, 0, PROTO_UNKNOWN}, '{K(1, 6, src), 0, 0, PROTO_UNKNOWN},
                    '{K(2, 6, {sp, dp}), 1, 0, PROTO_TCP}}, "tcp");
      // UDP
      p = ip_packet(ihl, 17, src, 32'h0A000002, sp, dp, 3, rep);
      send(p, ihl * 4 + 3);
      expect_reqs('{'{K(0, 4, 0), 0, 0, PROTO_UNKNOWN}, '{K(1, 17, src), 0, 0, PROTO_UNKNOWN},
                    '{K(2, 17, {sp, dp}), 1, 0, PROTO_UDP}}, "udp");
      // IP, other protocol (ICMP): path ends at level 1
      p = ip_packet(5, 1, src, 32'h0A000003, 0, 0, 4, rep);
      send(p, 15);
      expect_reqs('{'{K(0, 4, 0), 0, 0, PROTO_UNKNOWN}, '{K(1, 1, src), 1, 0, PROTO_UNKNOWN}}, "icmp");
      // ST-II
      p = st2_packet(sp, 10 + rep, rep);
      send(p, 5);
      expect_reqs('{'{K(0, 5, 0), 0, 0, PROTO_ST2}, '{K(1, 5, {16'h0, sp}), 1, 0, PROTO_ST2}}, "st2");
      // unknown network protocol
      p = st2_packet(sp, 4, rep); p[0] = 8'h65;
      send(p, 0);
      expect_reqs('{'{K(0, 6, 0), 1, 0, PROTO_UNKNOWN}}, "unknown version");
      // IP packet ending inside the header: abort at the last byte
      p = ip_packet(5, 6, src, 1, sp, dp, 0, rep);
      p = head(p, 12);
      send(p, 11);
      expect_reqs('{'{K(0, 4, 0), 0, 0, PROTO_UNKNOWN}, '{K(0, 0, 0), 1, 1, PROTO_UNKNOWN}}, "truncated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_protocol_filter: self-checking test of the whole protocol filter.
// Loads a protocol address tree into the CAM (IP, ST-II, two hosts, several
// TCP/UDP ports, two ST-II streams), then streams known and unknown packets
// with random input gaps and output back-pressure.  Every packet must leave
// unchanged with the CN built from the CAM rows of its path (or known = 0),
// and in order.  Also measures that back-to-back input at one byte per clock
// is accepted without stalls when the output is always ready.
//
// The traffic, the reference models and the expected values are this
// testbench's own; the behaviour checked is the one described in the module's
// header.
module tb_protocol_filter;
  import mpa_pkg::*;
  import tb_pkt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_sop, in_eop, out_valid, out_ready, out_sop, out_eop;
  logic [7:0] in_data, out_data;
  pkt_tag_t out_tag;
  logic cam_wr_en, cam_wr_valid;
  logic [CAM_AW-1:0] cam_wr_addr;
  cam_key_t cam_wr_key;
  int checks = 0, failures = 0;

  typedef struct { bq_t p; pkt_tag_t tag; } exp_t;
  exp_t expq[$];
  cam_key_t rows[CAM_DEPTH];
  int nrows = 0;
  bit gaps = 1, bp = 1;
  int in_stalls = 0, npk = 0;

  always #5 clk = ~clk;
  protocol_filter dut (.*);

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

  function automatic cam_key_t K(input int lvl, input int pt, input int unsigned a);
    cam_key_t k; k.level = 2'(lvl); k.ptype = 8'(pt); k.addr = a; return k;
  endfunction

  function automatic int find(input cam_key_t k);
    for (int i = 0; i < nrows; i++) if (rows[i] == k) return i;
    return -1;
  endfunction

  task automatic add_row(input cam_key_t k);
    @(negedge clk);
    cam_wr_en = 1; cam_wr_addr = CAM_AW'(nrows); cam_wr_valid = 1; cam_wr_key = k;
    rows[nrows++] = k;
    @(negedge clk); cam_wr_en = 0;
  endtask

  // reference: expected tag of a packet from the tb's own row table
  function automatic pkt_tag_t ref_tag(input bq_t p);
    pkt_tag_t t; int a0, a1, a2; int ver, ihl, l4;
    t = '0;
    ver = p[0] >> 4; ihl = p[0] & 15;
    a0 = find(K(0, ver, 0));
    if (a0 < 0) return t;
    if (ver == 5) begin
      if (p.size() < 6) return t;
      a1 = find(K(1, 5, {p[4], p[5]}));
      if (a1 < 0) return t;
      t.known = 1; t.proto = PROTO_ST2; t.cn = cn_t'({a1[3:0], a0[3:0]});
    end else if (ver == 4) begin
      if (p.size() < 16) return t;
      a1 = find(K(1, p[9], {p[12], p[13], p[14], p[15]}));
      if (a1 < 0) return t;
      if (p[9] != 6 && p[9] != 17) begin t.known = 1; t.proto = PROTO_UNKNOWN; t.cn = cn_t'({a1[3:0], a0[3:0]}); return t; end
      l4 = ihl * 4;
      if (p.size() < l4 + 4) return t;
      a2 = find(K(2, p[9], {p[l4], p[l4+1], p[l4+2], p[l4+3]}));
      if (a2 < 0) return t;
      t.known = 1; t.proto = (p[9] == 6) ? PROTO_TCP : PROTO_UDP; t.cn = cn_t'({a2[3:0], a1[3:0], a0[3:0]});
    end
    return t;
  endfunction

  task automatic send(input bq_t p);
    expq.push_back('{p, ref_tag(p)});
    npk++;
    for (int i = 0; i < p.size(); i++) begin
      in_valid = 1; in_data = p[i]; in_sop = (i == 0); in_eop = (i == p.size() - 1);
      @(posedge clk);
      while (!in_ready) begin in_stalls++; @(posedge clk); end
      #1;
      if (gaps && $urandom_range(0, 3) == 0) begin in_valid = 0; @(posedge clk); #1; end
    end
    in_valid = 0;
  endtask

  // output checker
  initial begin
    bq_t got; pkt_tag_t t0;
    forever begin
      @(posedge clk);
      if (rst_n && out_valid && out_ready) begin
        if (out_sop) begin got.delete(); t0 = out_tag; end
        chk(out_tag == t0, "tag stable during packet");
        got.push_back(out_data);
        if (out_eop) begin
          chk(expq.size() > 0, "expected packet");
          if (expq.size() > 0) begin
            chk(got == expq[0].p, "packet bytes unchanged");
            chk(t0 == expq[0].tag, $sformatf("tag %p expected %p", t0, expq[0].tag));
            void'(expq.pop_front());
          end
        end
      end
    end
  end
  always @(negedge clk) out_ready <= bp ? ($urandom_range(0, 3) != 0) : 1'b1;

  initial begin
    bq_t p; int t_start;
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = 0;
    cam_wr_en = 0; cam_wr_valid = 0; cam_wr_addr = 0; cam_wr_key = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    add_row(K(0, 4, 0));
    add_row(K(0, 5, 0));
    add_row(K(1, 6, 32'h0A000001));
    add_row(K(1, 17, 32'h0A000002));
    add_row(K(1, 6, 32'h0A000003));
    add_row(K(2, 6, {16'd1234, 16'd80}));
    add_row(K(2, 6, {16'd5000, 16'd21}));
    add_row(K(2, 17, {16'd7000, 16'd7001}));
    add_row(K(1, 5, 32'h0000_0101));
    add_row(K(1, 5, 32'h0000_0202));
    add_row(K(1, 1, 32'h0A000001));
    @(negedge clk);
    for (int n = 0; n < 150; n++) begin
      case ($urandom_range(0, 7))
        0: p = ip_packet(5, 6, 32'h0A000001, 1, 1234, 80, $urandom_range(0, 60), n);
        1: p = ip_packet(6, 6, 32'h0A000003, 1, 5000, 21, $urandom_range(0, 60), n);
        2: p = ip_packet(5, 17, 32'h0A000002, 1, 7000, 7001, $urandom_range(0, 60), n);
        3: p = st2_packet(($urandom_range(0, 1)) ? 16'h0101 : 16'h0202, $urandom_range(0, 80), n);
        4: p = ip_packet(5, 6, 32'h0A000001, 1, 1234, 81, 10, n);   // unknown port
        5: p = st2_packet(16'h0303, 20, n);                          // unknown stream
        6: p = ip_packet(5, 1, 32'h0A000001, 1, 0, 0, 8, n);        // ICMP from known host
        default: begin p = ip_packet(5, 6, 32'h0A000001, 1, 1234, 80, 0, n); p = head(p, $urandom_range(1, 21)); end
      endcase
      send(p);
    end
    // full-rate part: no gaps, no back-pressure
    gaps = 0; bp = 0;
    repeat (20) @(posedge clk);
    in_stalls = 0;
    for (int n = 0; n < 30; n++) send(ip_packet(5, 6, 32'h0A000001, 1, 1234, 80, 100, n));
    chk(in_stalls == 0, $sformatf("one byte per clock accepted (%0d stalls)", in_stalls));
    repeat (300) @(posedge clk);
    chk(expq.size() == 0, "all packets delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pf_cn_builder: self-checking test of the connection number builder.
// Plays request sequences with CAM results (one clock later) for three-
// level, two-level and one-level paths, with misses and aborts, and checks
// the CN = {addr2, addr1, addr0}, the known flag, the protocol type and that
// the result comes two clocks after the last request.
//
// The traffic, the reference models and the expected values are this
// testbench's own; the behaviour checked is the one described in the module's
// header.
module tb_pf_cn_builder;
  import mpa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_last, req_abort, cam_hit, res_valid;
  logic [1:0] req_level;
  proto_e req_proto;
  logic [CAM_AW-1:0] cam_addr;
  pkt_tag_t res_tag;
  int checks = 0, failures = 0;
  int paths = 0;

  always #5 clk = ~clk;
  pf_cn_builder dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one path: n levels, hits[], addrs[], optional abort on the last request
  task automatic path(input int n, input bit hits[3], input int addrs[3], input bit abort,
                      input proto_e pr);
    logic [CN_W-1:0] exp_cn;
    bit known;
    known = !abort;
    exp_cn = '0;
    for (int l = 0; l < n; l++) begin
      if (!(abort && l == n - 1)) begin
        known = known && hits[l];
        exp_cn[CAM_AW*l +: CAM_AW] = CAM_AW'(addrs[l]);
      end
      @(negedge clk);
      req_valid = 1; req_level = 2'(abort && l == n - 1 ? 0 : l); req_last = (l == n - 1);
      req_abort = abort && (l == n - 1); req_proto = pr;
      cam_hit = 0; cam_addr = CAM_AW'($urandom);
      @(negedge clk);
      req_valid = 0; req_last = 0; req_abort = 0;
      // CAM answers in this clock
      cam_hit = hits[l] && !(abort && l == n - 1); cam_addr = CAM_AW'(addrs[l]);
      chk(!res_valid, "no result before the last CAM answer");
      @(negedge clk);
      cam_hit = 0; cam_addr = CAM_AW'($urandom);
      if (l == n - 1) begin
        chk(res_valid, "result two clocks after the last request");
        chk(res_tag.known == known, "known flag");
        if (known) begin
          chk(res_tag.cn == exp_cn, $sformatf("cn %h expected %h", res_tag.cn, exp_cn));
          chk(res_tag.proto == pr, "protocol");
        end else begin
          chk(res_tag.cn == '0, "cn zero when unknown");
          chk(res_tag.proto == PROTO_UNKNOWN, "protocol unknown");
        end
        paths++;
      end else chk(!res_valid, "no early result");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  initial begin
    req_valid = 0; req_level = 0; req_last = 0; req_abort = 0; req_proto = PROTO_UNKNOWN;
    cam_hit = 0; cam_addr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      bit h[3]; int a[3]; int lv; bit ab;
      lv = $urandom_range(1, 3);
      for (int l = 0; l < 3; l++) begin h[l] = ($urandom_range(0, 5) != 0); a[l] = $urandom_range(0, CAM_DEPTH - 1); end
      ab = ($urandom_range(0, 7) == 0) && lv > 1;
      path(lv, h, a, ab, proto_e'($urandom_range(1, 3)));
    end
    chk(paths == 400, "all paths produced one result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

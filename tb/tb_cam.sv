// tb_cam: self-checking test of the CAM.  Loads rows, searches keys that are
// present, absent, differ in one field only, match two rows (lowest wins),
// and rows that were invalidated; checks the one-clock result latency.
//
// The traffic, the reference models and the expected values are this
// testbench's own; the behaviour checked is the one described in the module's
// header.
module tb_cam;
  import mpa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en, wr_valid, srch_en, srch_done, srch_hit;
  logic [CAM_AW-1:0] wr_addr, srch_addr;
  cam_key_t wr_key, srch_key;
  int checks = 0, failures = 0;
  cam_key_t keys[CAM_DEPTH];
  bit       vld[CAM_DEPTH];

  always #5 clk = ~clk;
  cam dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write_row(input int a, input bit v, input cam_key_t k);
    @(negedge clk); wr_en = 1; wr_addr = CAM_AW'(a); wr_valid = v; wr_key = k;
    @(negedge clk); wr_en = 0;
    keys[a] = k; vld[a] = v;
  endtask

  task automatic search(input cam_key_t k);
    int exp_a; bit exp_h;
    exp_h = 0; exp_a = 0;
    for (int i = CAM_DEPTH - 1; i >= 0; i--) if (vld[i] && keys[i] == k) begin exp_h = 1; exp_a = i; end
    @(negedge clk); srch_en = 1; srch_key = k;
    @(negedge clk); srch_en = 0;
    chk(srch_done == 1'b1, "done after one clock");
    chk(srch_hit == exp_h, $sformatf("hit for %h", k));
    if (exp_h) chk(srch_addr == CAM_AW'(exp_a), $sformatf("addr %0d got %0d", exp_a, srch_addr));
    @(negedge clk);
    chk(srch_done == 1'b0, "done is a pulse");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cam_key_t k;
    wr_en = 0; srch_en = 0; wr_addr = 0; wr_valid = 0; wr_key = '0; srch_key = '0;
    for (int i = 0; i < CAM_DEPTH; i++) begin vld[i] = 0; keys[i] = '0; end
    repeat (2) @(posedge clk); rst_n = 1;
    search('{level: 2'd0, ptype: 8'd4, addr: 32'd0});           // empty CAM: miss
    for (int i = 0; i < CAM_DEPTH; i++)
      write_row(i, 1, '{level: 2'(i % 3), ptype: 8'(i * 7), addr: $urandom});
    for (int i = 0; i < CAM_DEPTH; i++) search(keys[i]);
    k = keys[5]; k.addr[0] = ~k.addr[0]; search(k);             // one address bit differs
    k = keys[5]; k.level = k.level + 1'b1; search(k);           // level differs
    k = keys[5]; k.ptype = ~k.ptype; search(k);                 // protocol type differs
    write_row(12, 1, keys[3]);                                  // duplicate: lowest row wins
    search(keys[3]);
    write_row(3, 0, keys[3]);                                   // invalidate row 3: row 12 answers
    search(keys[3]);
    for (int n = 0; n < 200; n++) begin
      if ($urandom_range(0, 1)) search(keys[$urandom_range(0, CAM_DEPTH - 1)]);
      else search('{level: 2'($urandom), ptype: 8'($urandom), addr: $urandom});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

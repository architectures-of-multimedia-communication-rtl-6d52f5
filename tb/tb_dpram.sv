// tb_dpram: self-checking test of the dual-port packet memory.  Writes bytes
// through the DMA port and words (with byte enables) through the processor
// port, reads both ways against a byte-array model, and checks the one-clock
// read latency and the rule that the DMA port wins a same-byte collision.
//
// The traffic, the reference models and the expected values are this
// testbench's own; the behaviour checked is the one described in the module's
// header.
module tb_dpram;
  localparam int BYTES = 256;
  logic clk = 0;
  logic a_en, a_we, b_en;
  logic [$clog2(BYTES)-1:0] a_addr;
  logic [$clog2(BYTES)-3:0] b_addr;
  logic [7:0] a_wdata, a_rdata;
  logic [3:0] b_we;
  logic [31:0] b_wdata, b_rdata;
  byte unsigned model[BYTES];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  dpram #(.BYTES(BYTES)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill through port A
    for (int i = 0; i < BYTES; i++) begin
      @(negedge clk); a_en = 1; a_we = 1; a_addr = 8'(i); a_wdata = 8'(i * 5 + 3); model[i] = 8'(i * 5 + 3);
    end
    @(negedge clk); a_en = 0; a_we = 0;
    // word reads through port B
    for (int w = 0; w < BYTES / 4; w++) begin
      @(negedge clk); b_en = 1; b_we = 0; b_addr = 6'(w);
      @(negedge clk); b_en = 0;
      chk(b_rdata == {model[4*w+3], model[4*w+2], model[4*w+1], model[4*w]}, $sformatf("word %0d", w));
    end
    // random mixed traffic
    for (int n = 0; n < 2000; n++) begin
      int aa, ba; bit aw; logic [3:0] bw; byte unsigned ad; logic [31:0] bd;
      logic [7:0] exp_a; logic [31:0] exp_b;
      aa = $urandom_range(0, BYTES - 1); ba = $urandom_range(0, BYTES / 4 - 1);
      aw = 1'($urandom_range(0, 1)); bw = 4'($urandom); ad = 8'($urandom); bd = $urandom;
      if (n % 50 == 0) ba = aa / 4;                 // force collisions now and then
      exp_a = model[aa];
      exp_b = {model[4*ba+3], model[4*ba+2], model[4*ba+1], model[4*ba]};
      @(negedge clk);
      a_en = 1; a_we = aw; a_addr = 8'(aa); a_wdata = ad;
      b_en = 1; b_we = bw; b_addr = 6'(ba); b_wdata = bd;
      @(negedge clk);
      a_en = 0; b_en = 0;
      chk(a_rdata == exp_a, "port A read-before-write data");
      chk(b_rdata == exp_b, "port B read-before-write data");
      for (int k = 0; k < 4; k++) if (bw[k]) model[4*ba+k] = bd[8*k +: 8];
      if (aw) model[aa] = ad;                        // port A wins
    end
    for (int i = 0; i < BYTES; i++) begin
      @(negedge clk); a_en = 1; a_we = 0; a_addr = 8'(i);
      @(negedge clk); a_en = 0;
      chk(a_rdata == model[i], $sformatf("final byte %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

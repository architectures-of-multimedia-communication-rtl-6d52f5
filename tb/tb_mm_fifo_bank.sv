// tb_mm_fifo_bank: self-checking test of the multimedia FIFO bank.  Writes
// distinct streams into each FIFO at once and reads them at different rates;
// each FIFO must deliver its own stream in order, independent of the others,
// and report full at its depth.
//
// The traffic, the reference models and the expected values are this
// testbench's own; the behaviour checked is the one described in the module's
// header.
module tb_mm_fifo_bank;
  localparam int NUM = 4, DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic [NUM-1:0] wr_en, rd_en, full, empty;
  logic [NUM-1:0][7:0] wr_data, rd_data;
  logic [NUM-1:0][$clog2(DEPTH):0] count;
  byte unsigned model[NUM][$];
  int checks = 0, failures = 0;
  int fulls = 0;

  always #5 clk = ~clk;
  mm_fifo_bank #(.NUM(NUM), .DEPTH(DEPTH)) dut (.*);

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
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int f = 0; f < NUM; f++) begin
        chk(empty[f] == (model[f].size() == 0), "empty");
        chk(full[f] == (model[f].size() == DEPTH), "full");
        if (full[f]) fulls++;
        if (model[f].size() > 0) chk(rd_data[f] == model[f][0], $sformatf("fifo %0d data", f));
        wr_en[f]   = !full[f] && ($urandom_range(0, 7) < 4);
        rd_en[f]   = !empty[f] && ($urandom_range(0, 7) < f + 1);
        wr_data[f] = 8'(f * 64 + n);
      end
      @(posedge clk); #1;
      for (int f = 0; f < NUM; f++) begin
        if (rd_en[f]) void'(model[f].pop_front());
        if (wr_en[f]) model[f].push_back(wr_data[f]);
      end
    end
    chk(fulls > 0, "some FIFO filled up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sync_fifo: self-checking test of sync_fifo (send/receive queue).
// Random pushes and pops against a queue model; checks head data, empty,
// full and count every clock, including pushes into a full queue and pops
// from an empty one being refused.
//
// The traffic, the reference models and the expected values are this
// testbench's own; the behaviour checked is the one described in the module's
// header.
module tb_sync_fifo;
  localparam int W = 8, D = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, empty, full;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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
    int fulls = 0;
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == D), "full");
      chk(count == model.size(), "count");
      if (model.size() > 0) chk(rd_data == model[0], "head data");
      if (full) fulls++;
      // bias: fill phases and drain phases
      wr_en   = ((i / 200) % 2 == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      rd_en   = ((i / 200) % 2 == 0) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      if (empty) rd_en = 0;       // the queue's users never pop an empty queue
      if (full && !rd_en) wr_en = 0;
      wr_data = W'($urandom);
      @(posedge clk);
      #1;
      if (rd_en && model.size() > 0) void'(model.pop_front());
      if (wr_en && model.size() < D) model.push_back(wr_data);
    end
    chk(fulls > 0, "queue reached full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_free_queue: self-checking test of the free buffer queue.  After reset it
// must hand out every buffer number 0..N-1 in order, then report empty; numbers
// released come back in release order, also with alloc and release in the
// same clock.
//
// The traffic, the reference models and the expected values are this
// testbench's own; the behaviour checked is the one described in the module's
// header.
module tb_free_queue;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic alloc_valid, alloc_pop, release_en;
  logic [$clog2(N)-1:0] alloc_slot, release_slot;
  logic [$clog2(N):0] free_count;
  int checks = 0, failures = 0;
  int model[$];

  always #5 clk = ~clk;
  free_queue #(.N(N)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int held[$];
    alloc_pop = 0; release_en = 0; release_slot = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // nothing may be offered while the queue refills (N clocks)
    repeat (N - 1) begin
      @(negedge clk);
      checks++;
      if (alloc_valid) begin failures++; $display("FAIL buffer offered during refill"); end
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    chk(free_count == N, "full after reset");
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      chk(alloc_valid && alloc_slot == i, $sformatf("initial slot %0d", i));
      alloc_pop = 1; held.push_back(alloc_slot);
      @(negedge clk); alloc_pop = 0;
    end
    @(negedge clk);
    chk(!alloc_valid, "empty after taking all");
    // release in a scrambled order
    held.shuffle();
    foreach (held[i]) model.push_back(held[i]);
    foreach (held[i]) begin
      @(negedge clk); release_en = 1; release_slot = 3'(held[i]);
    end
    @(negedge clk); release_en = 0;
    held.delete();
    for (int n = 0; n < 300; n++) begin
      bit pop, rel; int r;
      @(negedge clk);
      chk(alloc_valid == (model.size() > 0), "valid");
      chk(free_count == model.size(), "count");
      if (model.size() > 0) chk(alloc_slot == model[0], "order");
      pop = (model.size() > 0) && $urandom_range(0, 1);
      rel = (held.size() > 0) && $urandom_range(0, 1);
      alloc_pop = pop; release_en = 0;
      if (pop) begin held.push_back(model[0]); void'(model.pop_front()); end
      if (rel && held.size() > 1) begin
        r = held[0]; held.delete(0);
        release_en = 1; release_slot = 3'(r); model.push_back(r);
      end
      @(negedge clk); alloc_pop = 0; release_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

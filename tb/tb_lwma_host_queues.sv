// tb_lwma_host_queues: random producers and consumers on all connections.
// A reference model tracks which buffers are free and the order of each
// connection's queue.  Checks: every buffer number is handed out once until it
// is returned (no duplicates), connection queues deliver in order, the free
// count matches, and after everything is returned all NBUF buffers are free.
// Also checks that a free buffer can be taken every clock (one per cycle).
//
// The traffic, the reference models and the expected values are this
// testbench's own; the behaviour checked is the one described in the module's
// header.
module tb_lwma_host_queues;
  localparam int NBUF = 16, NCONN = 4, BW = 4;
  logic clk = 0, rst_n = 0;
  logic fb_valid, fb_get, fb_put;
  logic [BW-1:0] fb_buf, fb_put_buf;
  logic [BW:0] fb_count;
  logic [NCONN-1:0] push, full, head_valid, pop;
  logic [NCONN-1:0][BW-1:0] push_buf, head_buf;
  logic [NCONN-1:0][BW:0] qcount;

  lwma_host_queues #(.NBUF(NBUF), .NCONN(NCONN)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit out[NBUF];                 // buffer handed out (not in the free queue)
  int held[$];                   // taken from the free queue, not yet pushed
  int q[NCONN][$];               // model of the connection queues
  int done[$];                   // popped, to be returned

  initial begin
    int c, b, t0;
    fb_get = 0; fb_put = 0; fb_put_buf = 0; push = 0; push_buf = '0; pop = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (NBUF + 2) @(negedge clk);
    chk(fb_count == NBUF && fb_valid, "all buffers free after reset");
    // one free buffer per clock
    t0 = 0;
    for (int i = 0; i < NBUF; i++) begin
      chk(fb_valid, "free buffer available every clock");
      b = fb_buf; chk(!out[b], $sformatf("buffer %0d handed out twice", b));
      out[b] = 1; held.push_back(b);
      fb_get = 1; @(negedge clk); fb_get = 0; t0++;
    end
    chk(!fb_valid && fb_count == 0, "free queue empty after NBUF takes");
    chk(t0 == NBUF, "NBUF takes in NBUF clocks");
    // random traffic
    for (int it = 0; it < 6000; it++) begin
      fb_get = 0; fb_put = 0; push = 0; pop = 0;
      // take a free buffer
      if (fb_valid && $urandom_range(0, 2) == 0) begin
        b = fb_buf; chk(!out[b], $sformatf("buffer %0d handed out twice", b));
        out[b] = 1; held.push_back(b); fb_get = 1;
      end
      // producer pushes a held buffer to a random connection
      if (held.size() > 0 && $urandom_range(0, 1) == 0) begin
        c = $urandom_range(0, NCONN - 1);
        chk(!full[c], "connection queue never full");
        push[c] = 1; push_buf[c] = BW'(held[0]); q[c].push_back(held.pop_front());
      end
      // consumers
      for (int k = 0; k < NCONN; k++) begin
        // q[k] already holds this clock's push, which is not visible yet
        chk(head_valid[k] == ((q[k].size() - int'(push[k])) > 0), "head_valid matches model");
        if (head_valid[k] && $urandom_range(0, 2) == 0) begin
          chk(head_buf[k] == q[k][0], $sformatf("connection %0d order", k));
          done.push_back(q[k].pop_front()); pop[k] = 1;
          chk(qcount[k] == q[k].size() + 1 - int'(push[k]), "queue fill level");
        end
      end
      // return a consumed buffer
      if (done.size() > 0 && $urandom_range(0, 1) == 0) begin
        b = done.pop_front(); out[b] = 0; fb_put = 1; fb_put_buf = BW'(b);
      end
      @(negedge clk);
      begin
        int nfree; nfree = 0;
        foreach (out[i]) if (!out[i]) nfree++;
        chk(fb_count == nfree, $sformatf("free count %0d, model %0d", fb_count, nfree));
      end
    end
    fb_get = 0; push = 0; fb_put = 0; pop = 0;
    // drain everything back
    while (held.size() > 0) begin
      c = held.size() % NCONN;
      push = 0; push[c] = 1; push_buf[c] = BW'(held[0]); q[c].push_back(held.pop_front());
      @(negedge clk);
    end
    push = 0;
    for (int k = 0; k < NCONN; k++)
      while (q[k].size() > 0) begin
        chk(head_valid[k] && head_buf[k] == q[k][0], "drain order");
        b = q[k].pop_front(); pop = 0; pop[k] = 1; @(negedge clk); pop = 0;
        fb_put = 1; fb_put_buf = BW'(b); out[b] = 0; @(negedge clk); fb_put = 0;
      end
    while (done.size() > 0) begin
      b = done.pop_front(); out[b] = 0; fb_put = 1; fb_put_buf = BW'(b); @(negedge clk);
    end
    fb_put = 0; @(negedge clk);
    chk(fb_count == NBUF, $sformatf("all buffers back: %0d", fb_count));
    chk(head_valid == 0, "all connection queues empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

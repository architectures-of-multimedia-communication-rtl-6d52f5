// tb_conn_table: self-checking test of the connection table.  Entries read
// invalid after reset; written entries appear on every read port in the
// same cycle as the address; overwrites and invalidation take effect.
//
// The traffic, the reference models and the expected values are this
// testbench's own; the behaviour checked is the one described in the module's
// header.
module tb_conn_table;
  import mpa_pkg::*;
  localparam int NRD = 3;
  logic clk = 0, rst_n = 0;
  logic wr_en;
  cn_t wr_cn;
  conn_info_t wr_info;
  cn_t [NRD-1:0] rd_cn;
  conn_info_t [NRD-1:0] rd_info;
  conn_info_t model[cn_t];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  conn_table #(.NRD(NRD)) dut (.*);

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
    wr_en = 0; wr_cn = '0; wr_info = '0; rd_cn = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      @(negedge clk);
      for (int r = 0; r < NRD; r++) begin rd_cn[r] = cn_t'($urandom); #1; chk(!rd_info[r].valid, "invalid after reset"); end
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1);
      wr_cn = (model.size() > 0 && $urandom_range(0, 3) == 0) ? cn_t'($urandom_range(0, 15)) : cn_t'($urandom);
      wr_info = conn_info_t'({$urandom, $urandom});
      if (n % 7 == 0) wr_info.valid = 1'b0;
      for (int r = 0; r < NRD; r++) begin
        cn_t c;
        if (model.size() > 0 && $urandom_range(0, 1)) begin
          int k = $urandom_range(0, model.size() - 1);
          foreach (model[key]) begin if (k == 0) c = key; k--; end
        end else c = cn_t'($urandom);
        rd_cn[r] = c;
      end
      #1;
      for (int r = 0; r < NRD; r++) begin
        if (model.exists(rd_cn[r]) && model[rd_cn[r]].valid)
          chk(rd_info[r] == model[rd_cn[r]], "entry read back");
        else
          chk(!rd_info[r].valid, "unwritten or invalid entry");
      end
      @(posedge clk); #1;
      if (wr_en) model[wr_cn] = wr_info;
      wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

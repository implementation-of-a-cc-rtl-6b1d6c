// tb_msg_fifo: random pushes and pops against a queue model, at a reduced
// depth so that full is reached; checks head data, empty, full and level
// every clock, and that writes when full and reads when empty are ignored.
module tb_msg_fifo;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0, full, empty;
  logic [31:0] wr_data = 0, rd_data;
  logic [4:0] level;
  logic [31:0] q[$];
  int checks = 0, failures = 0, n_full = 0, n_empty_rd = 0;

  msg_fifo #(.W(32), .DEPTH(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    for (int c = 0; c < 4000; c++) begin
      int bias;
      bias = (c / 500) % 2;   // alternate filling and draining phases
      wr_en   = ($urandom_range(3) < (bias ? 1 : 3));
      rd_en   = ($urandom_range(3) < (bias ? 3 : 1));
      wr_data = $urandom;
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == 16) || level != 5'(q.size()) ||
          (q.size() != 0 && rd_data != q[0])) begin
        failures++;
        if (failures < 10) $display("FAIL c=%0d size=%0d level=%0d empty=%0d full=%0d", c, q.size(), level, empty, full);
      end
      if (full && wr_en) n_full++;
      if (empty && rd_en) n_empty_rd++;
      @(posedge clk);
      begin
        int sz;
        sz = q.size();
        if (rd_en && sz != 0) void'(q.pop_front());
        if (wr_en && sz < 16) q.push_back(wr_data);
      end
      @(negedge clk);
    end
    checks++;
    if (n_full == 0 || n_empty_rd == 0) failures++;
    $display("write-when-full=%0d read-when-empty=%0d", n_full, n_empty_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

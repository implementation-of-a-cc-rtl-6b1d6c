// tb_bank_timer: loads the bank time-out circuit with several counts and
// checks busy and time-out cycle by cycle against a count kept in the
// testbench: busy from the load until free, time-out exactly after `count`
// ticks, a zero count timing out at once, and free releasing the bank.
module tb_bank_timer;
  logic clk = 0, rst = 1, tick = 0, loadcount = 0, free = 0;
  logic [7:0] count = 0;
  logic busy, timeout;
  int checks = 0, failures = 0;

  bank_timer #(.CNT_W(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic run(int n, int tick_every);
    int ticks = 0;
    @(negedge clk); count = 8'(n); loadcount = 1;
    @(negedge clk); loadcount = 0;
    for (int c = 0; c < n * tick_every + 5; c++) begin
      checks++;
      if (!busy || timeout != (ticks >= n)) begin
        failures++;
        $display("FAIL n=%0d c=%0d busy=%0d timeout=%0d ticks=%0d", n, c, busy, timeout, ticks);
      end
      tick = (c % tick_every == tick_every - 1);
      @(negedge clk);
      if (tick) ticks++;
      tick = 0;
    end
    free = 1;
    @(negedge clk); free = 0;
    checks++;
    if (busy || timeout) begin failures++; $display("FAIL not freed"); end
  endtask

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    checks++;
    if (busy || timeout) begin failures++; $display("FAIL after reset"); end
    run(5, 1);
    run(3, 8);
    run(0, 1);
    run(200, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

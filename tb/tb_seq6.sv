// tb_seq6: checks that the phase register starts with its leftmost bit set,
// rotates right once per clock, keeps exactly one bit hot, and that the
// decoded phase index and pclock start repeat with a period of eight clocks.
module tb_seq6;
  logic clk = 0, rst = 1;
  logic [7:0] phase;
  logic [2:0] phase_idx;
  logic pclk_start;
  int checks = 0, failures = 0, starts = 0;

  seq6 #(.STEPS(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    for (int c = 0; c < 80; c++) begin
      checks++;
      if (phase != (8'h80 >> (c % 8)) || phase_idx != 3'(c % 8) || pclk_start != (c % 8 == 0)) begin
        failures++;
        $display("FAIL c=%0d phase=%b idx=%0d start=%0d", c, phase, phase_idx, pclk_start);
      end
      if (pclk_start) starts++;
      @(negedge clk);
    end
    checks++;
    if (starts != 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

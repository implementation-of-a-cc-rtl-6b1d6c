// tb_nic_fifo_ctrl: random increments and decrements of both message
// counters against two integer models; checks msg_ready, out_avail and both
// overflow flags every clock, including simultaneous up and down counts.
module tb_nic_fifo_ctrl;
  logic clk = 0, rst = 1;
  logic unit_inc = 0, nic_dec = 0, nic_inc = 0, unit_dec = 0;
  logic msg_ready, out_avail, in_overflow, out_overflow;
  int checks = 0, failures = 0, in_n = 0, out_n = 0, hit_ovf = 0, hit_both = 0;

  nic_fifo_ctrl #(.MAX_MSGS(120)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    for (int c = 0; c < 6000; c++) begin
      int phase;
      phase = (c / 600) % 2;
      unit_inc = !in_overflow && ($urandom_range(3) < (phase ? 3 : 1));
      nic_dec  = (in_n > 0) && ($urandom_range(3) < (phase ? 1 : 3));
      nic_inc  = !out_overflow && ($urandom_range(3) < (phase ? 3 : 1));
      unit_dec = (out_n > 0) && ($urandom_range(3) < (phase ? 1 : 3));
      if (unit_inc && nic_dec) hit_both++;
      @(negedge clk);
      in_n  += int'(unit_inc) - int'(nic_dec);
      out_n += int'(nic_inc) - int'(unit_dec);
      checks++;
      if (msg_ready != (in_n > 0) || out_avail != (out_n > 0) ||
          in_overflow != (in_n >= 120) || out_overflow != (out_n >= 120)) begin
        failures++;
        if (failures < 10) $display("FAIL c=%0d in=%0d out=%0d flags=%b%b%b%b", c, in_n, out_n,
                                    msg_ready, out_avail, in_overflow, out_overflow);
      end
      if (in_overflow) hit_ovf++;
    end
    checks++;
    if (hit_ovf == 0 || hit_both == 0) failures++;
    $display("overflow cycles=%0d simultaneous=%0d", hit_ovf, hit_both);
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

// tb_victim_select: random sets of four ways with random tags and states.
// Checks the tag match (and that the scan stops at the matching way), that
// the chosen victim has the highest grade present (INV > RO > RW >
// PENDING), that no victim is offered when every way is pending, and that
// ties between equal grades are broken both ways over many trials.
module tb_victim_select;
  import rpm_pkg::*;
  localparam int A = 4;
  logic clk = 0, rst = 1, start = 0, entry_valid = 0, entry_last = 0;
  logic [11:0] tag = 0, entry_tag = 0;
  slc_state_e entry_state = SLC_INV, hit_state, victim_state;
  logic [2:0] entry_way = 0, hit_way, victim_way;
  logic done, hit, victim_avail;
  int checks = 0, failures = 0, tie_first = 0, tie_second = 0, n_hit = 0, n_none = 0;

  victim_select #(.ASSOC(A), .TAG_W(12)) dut (.*);
  always #5 clk = ~clk;

  slc_state_e sts [9] = '{SLC_INV, SLC_RO, SLC_RW, SLC_PEND_RO, SLC_PEND_RW_INV, SLC_PEND_RW_VAL,
                          SLC_PEND_PF_RO, SLC_PEND_PF_RW_INV, SLC_PEND_PF_RW_VAL};

  initial begin
    logic [11:0] tg[A];
    slc_state_e  st[A];
    int exp_hit, best, nscan;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      tag = 12'($urandom_range(7));
      for (int w = 0; w < A; w++) begin
        tg[w] = 12'($urandom_range(7));
        st[w] = sts[(n % 3 == 0) ? $urandom_range(3, 8) : $urandom_range(8)];
      end
      if (n % 5 == 0) begin st[0] = SLC_RO; st[1] = SLC_RO; st[2] = SLC_RW; st[3] = SLC_RW;
                            tg[0] = tag + 1; tg[1] = tag + 2; tg[2] = tag + 4; st[2] = SLC_PEND_RO;
                            tg[3] = tag + 3; end
      exp_hit = -1; best = -1;
      for (int w = 0; w < A; w++)
        if (exp_hit < 0 && st[w] != SLC_INV && tg[w] == tag) exp_hit = w;
      nscan = (exp_hit >= 0) ? exp_hit + 1 : A;
      for (int w = 0; w < nscan; w++)
        if (best < 0 || victim_grade(st[w]) > victim_grade(st[best])) best = w;
      start = 1; @(negedge clk); start = 0;
      for (int w = 0; w < A; w++) begin
        entry_valid = 1; entry_tag = tg[w]; entry_state = st[w]; entry_way = 3'(w);
        entry_last = (w == A - 1);
        @(negedge clk);
        if (done) break;
      end
      entry_valid = 0; entry_last = 0;
      while (!done) @(negedge clk);
      checks++;
      if (exp_hit >= 0) begin
        n_hit++;
        if (!hit || hit_way != 3'(exp_hit)) begin failures++; $display("FAIL hit exp %0d got %0d/%0d", exp_hit, hit, hit_way); end
      end else if (hit) begin
        failures++; $display("FAIL false hit");
      end else if (victim_grade(st[best]) == 0) begin
        n_none++;
        if (victim_avail) begin failures++; $display("FAIL victim offered among pending"); end
      end else if (!victim_avail || victim_grade(victim_state) != victim_grade(st[best]) ||
                   st[victim_way] != victim_state) begin
        failures++; $display("FAIL victim grade %0d exp %0d", victim_grade(victim_state), victim_grade(st[best]));
      end
      if (n % 5 == 0 && exp_hit < 0) begin
        if (victim_way == 0) tie_first++;
        if (victim_way == 1) tie_second++;
      end
    end
    checks++;
    if (tie_first == 0 || tie_second == 0 || n_hit == 0 || n_none == 0) begin
      failures++; $display("FAIL coverage ties %0d/%0d hits %0d none %0d", tie_first, tie_second, n_hit, n_none);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

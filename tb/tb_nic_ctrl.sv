// tb_nic_ctrl: the routing controller alone, with the FIFOs and message
// counters modelled in the testbench.  For every message type, local and
// remote destinations and every source port it checks the chosen
// destination, the number of words moved (the message length), the
// nic_dec/nic_inc pulses, the wait while the destination is at its message
// limit, the polling priority, and the discard of a message addressed back
// to its own port.
module tb_nic_ctrl;
  import rpm_pkg::*;
  localparam int BW = 4;
  localparam logic [3:0] BOARD = 4'd6;

  logic clk = 0, rst = 1;
  logic [2:0] msg_ready = 0, out_overflow = 0, in_empty, out_full = 0;
  logic [2:0][31:0] in_data;
  logic [1:0] src, dst;
  logic xfer, error, busy;
  logic [2:0] drop_rd, nic_dec, nic_inc;

  nic_ctrl #(.BLOCK_WORDS(BW)) dut (.clk, .rst, .board_id(BOARD), .msg_ready, .out_overflow,
    .in_empty, .out_full, .in_data, .src, .dst, .xfer, .drop_rd, .nic_dec, .nic_inc, .error, .busy);

  always #5 clk = ~clk;

  logic [31:0] q[3][$];
  int moved, decs, incs, errs, last_dst, checks = 0, failures = 0;

  always @(posedge clk) begin
    if (xfer) begin void'(q[src].pop_front()); moved++; last_dst = dst; end
    for (int p = 0; p < 3; p++) if (drop_rd[p]) void'(q[p].pop_front());
    if (nic_dec != 0) decs++;
    if (nic_inc != 0) incs++;
    if (error) errs++;
  end
  always @(negedge clk)
    for (int p = 0; p < 3; p++) begin
      in_empty[p] = (q[p].size() == 0);
      in_data[p]  = in_empty[p] ? 32'h0 : q[p][0];
    end

  task automatic one(int s, msg_type_e t, logic [3:0] dn, int exp_dst, bit hold_ovf = 0);
    int len, t0;
    len = msg_len(t, BW);
    q[s].push_back(make_hdr(t, 4'd1, dn));
    for (int i = 1; i < len; i++) q[s].push_back(32'(i));
    moved = 0; decs = 0; incs = 0; errs = 0; last_dst = -1;
    if (hold_ovf) out_overflow[exp_dst] = 1;
    @(negedge clk); msg_ready[s] = 1;
    if (hold_ovf) begin
      repeat (20) @(negedge clk);
      checks++;
      if (moved != 0) begin failures++; $display("FAIL moved into overflowing FIFO"); end
      out_overflow = 0;
    end
    t0 = 0;
    while (q[s].size() != 0 && t0 < 200) begin @(negedge clk); t0++; end
    msg_ready[s] = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_dst == s) begin
      if (moved != 0 || errs != 1 || decs != 1 || incs != 0) begin
        failures++; $display("FAIL drop s=%0d moved=%0d errs=%0d", s, moved, errs);
      end
    end else if (moved != len || last_dst != exp_dst || decs != 1 || incs != 1 || errs != 0) begin
      failures++;
      $display("FAIL s=%0d t=%s dn=%0d: moved=%0d/%0d dst=%0d/%0d dec=%0d inc=%0d",
               s, t.name(), dn, moved, len, last_dst, exp_dst, decs, incs);
    end
  endtask

  initial begin
    msg_type_e ty [12] = '{RMISS_REQ, WMISS_REQ, OWN_REQ, INV_ACK, WBACK, WWORD_REQ,
                           MISS_REPLY, OWN_REPLY, INVALIDATION, NACK, RWORD_REPLY, RBLOCK_REPLY};
    repeat (3) @(negedge clk);
    rst = 0;
    for (int s = 0; s < 3; s++)
      foreach (ty[i]) begin
        one(s, ty[i], BOARD, (ty[i] < 16) ? 2 : 1);
        one(s, ty[i], 4'd3, 0);
      end
    one(1, MISS_REPLY, 4'd3, 0, 1);
    // priority: ports 2 and 1 ready together, then port 0 joins; 0 then 1 then 2
    begin
      int order[$];
      q[2].push_back(make_hdr(RMISS_REQ, 4'd1, 4'd3)); q[2].push_back(0);
      q[1].push_back(make_hdr(RMISS_REQ, 4'd1, BOARD)); q[1].push_back(0);
      q[0].push_back(make_hdr(MISS_REPLY, 4'd1, BOARD));
      for (int i = 1; i < 2 + BW; i++) q[0].push_back(0);
      @(negedge clk); msg_ready = 3'b111;
      for (int c = 0; c < 100; c++) begin
        @(posedge clk);
        if (nic_dec != 0) begin
          order.push_back($clog2(nic_dec));
        end
        @(negedge clk);
        msg_ready = msg_ready & ~{q[2].size() == 0, q[1].size() == 0, q[0].size() == 0};
      end
      checks++;
      if (order.size() != 3 || order[0] != 0 || order[1] != 1 || order[2] != 2) begin
        failures++; $display("FAIL priority order %p", order);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

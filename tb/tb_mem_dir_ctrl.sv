// tb_mem_dir_ctrl: drives the memory/directory controller through its input
// FIFO with test-mode and coherence messages and checks every message it
// sends, the directory entries and performance counters it leaves in DRAM,
// the bank delays and the blocking of a request whose bank is busy.
// Expected messages are written out by hand from the protocol tables.
// Block size is reduced to 8 words to keep the run short.
module tb_mem_dir_ctrl;
  import rpm_pkg::*;

  localparam int unsigned BW = 8;
  localparam logic [23:0] DIR_BASE  = 24'h80_0000;
  localparam logic [23:0] PERF_BASE = 24'hC0_0000;

  logic clk = 0, rst = 1, tick = 0;
  logic [5:0][15:0] susp_time;
  logic in_empty = 1, in_rd, in_msg_done, out_full = 0, out_ovf = 0, out_wr, out_msg_done;
  logic [31:0] in_data = 0, out_data;
  logic mem_req, mem_we, mem_ack;
  logic [23:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic error, ev_suspend, ev_resume, ev_nack, ev_blocked, ev_inval;
  logic [3:0] bank_busy;

  int checks = 0, failures = 0;
  int n_blocked = 0, n_suspend = 0, n_resume = 0, n_nack = 0, n_inval = 0, max_busy = 0;
  int cycle = 0, last_suspend = 0;

  logic [31:0] inq[$];
  logic [31:0] outq[$];

  mem_dir_ctrl #(.BLOCK_WORDS(BW)) dut (
    .clk, .rst, .tick, .node_id(4'd0), .susp_time,
    .in_empty, .in_data, .in_rd, .in_msg_done,
    .out_full, .out_ovf, .out_wr, .out_data, .out_msg_done,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata,
    .error, .bank_busy, .ev_suspend, .ev_resume, .ev_nack, .ev_blocked, .ev_inval);

  dram_model #(.AW(24), .LAT(2)) u_dram (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    tick  <= (cycle % 8 == 6);
    if (in_rd) void'(inq.pop_front());
    if (out_wr) outq.push_back(out_data);
    if (ev_blocked) n_blocked++;
    if (ev_suspend) begin n_suspend++; last_suspend <= cycle; end
    if (ev_resume) n_resume++;
    if (ev_nack) n_nack++;
    if (ev_inval) n_inval++;
    if (!rst && $countones(bank_busy) > max_busy) max_busy = $countones(bank_busy);
  end

  always @(negedge clk) begin
    in_empty = (inq.size() == 0);
    in_data  = in_empty ? 32'h0 : inq[0];
    out_full = ($urandom_range(7) == 0);
    out_ovf  = ($urandom_range(5) == 0);
  end

  function automatic logic [31:0] hdr(msg_type_e t, int s, int d);
    return make_hdr(t, 4'(s), 4'(d));
  endfunction

  task automatic send(msg_type_e t, int s, logic [31:0] addr, logic [31:0] data[$] = {});
    inq.push_back(hdr(t, s, 0));
    inq.push_back(addr);
    foreach (data[i]) inq.push_back(data[i]);
  endtask

  // wait for n words from the controller and compare them
  task automatic expect_words(string what, logic [31:0] exp[$], int timeout = 3000);
    int t = 0;
    while (outq.size() < exp.size() && t < timeout) begin @(posedge clk); t++; end
    checks++;
    if (outq.size() < exp.size()) begin
      failures++;
      $display("FAIL %s: got %0d of %0d words", what, outq.size(), exp.size());
      outq.delete();
      return;
    end
    foreach (exp[i]) begin
      logic [31:0] w = outq.pop_front();
      if (w !== exp[i]) begin
        failures++;
        $display("FAIL %s word %0d: got %h exp %h", what, i, w, exp[i]);
        break;
      end
    end
  endtask

  task automatic expect_quiet(string what, int cycles);
    repeat (cycles) @(posedge clk);
    checks++;
    if (outq.size() != 0) begin
      failures++;
      $display("FAIL %s: %0d unexpected words, first %h", what, outq.size(), outq[0]);
      outq.delete();
    end
  endtask

  task automatic check_dir(string what, logic [31:0] byte_addr, dir_entry_t exp);
    dir_entry_t got;
    got = dir_entry_t'(u_dram.peek(DIR_BASE | 24'(byte_addr[24:5]))[17:0]);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: dir %h exp %h", what, got, exp);
    end
  endtask

  function automatic dir_entry_t de(logic [9:0] p, logic d, logic l = 0,
                                    lock_type_e lt = LT_SH_DTY_OWN, int r = 0);
    dir_entry_t e;
    e.pbits = p; e.dbit = d; e.locked = l; e.ltype = lt; e.req_id = 4'(r);
    return e;
  endfunction

  logic [31:0] blk[$], blk2[$], exp[$];
  localparam logic [31:0] B  = 32'h0000_1000;  // bank 0
  localparam logic [31:0] C  = 32'h0000_1020;  // bank 1
  localparam logic [31:0] D2 = 32'h0000_1080;  // bank 0 again

  initial begin
    // busy times in pclocks for classes A..F
    susp_time = '{16'd3, 16'd3, 16'd2, 16'd1, 16'd4, 16'd3};  // F,E,D,C,B,A
    repeat (4) @(posedge clk);
    rst = 0;

    // ---- test mode: write and read a word
    send(WWORD_REQ, 5, 32'h0000_0200, '{32'hCAFE_0001});
    send(RWORD_REQ, 5, 32'h0000_0200);
    expect_words("rword_reply", '{hdr(RWORD_REPLY, 0, 5), 32'h0000_0200, 32'hCAFE_0001});

    // ---- test mode: write and read a block
    for (int i = 0; i < BW; i++) blk.push_back(32'hB000_0000 + i);
    send(WBLOCK_REQ, 5, B, blk);
    send(RBLOCK_REQ, 5, B);
    exp = '{hdr(RBLOCK_REPLY, 0, 5), B};
    foreach (blk[i]) exp.push_back(blk[i]);
    expect_words("rblock_reply", exp);

    // ---- read miss on an uncached block: miss_reply after class A delay
    send(RMISS_REQ, 1, B);
    exp = '{hdr(MISS_REPLY, 0, 1), B};
    foreach (blk[i]) exp.push_back(blk[i]);
    expect_words("miss_reply n1", exp);
    checks++;
    if (cycle - last_suspend < (3 - 1) * 8) begin
      failures++; $display("FAIL class A delay too short: %0d", cycle - last_suspend);
    end
    check_dir("shared n1", B, de(10'b0000000010, 0));
    checks++;
    if (u_dram.peek(PERF_BASE | 24'({3'd1, 5'd0, 4'd0, 8'd0})) != 1) begin
      failures++; $display("FAIL perf counter");
    end

    send(RMISS_REQ, 2, B);
    expect_words("miss_reply n2", {hdr(MISS_REPLY, 0, 2), B, blk});
    check_dir("shared n1 n2", B, de(10'b0000000110, 0));

    // ---- write miss with other sharers: invalidations to 1 and 2
    send(WMISS_REQ, 3, B);
    expect_words("invalidations", '{hdr(INVALIDATION, 0, 1), B, hdr(INVALIDATION, 0, 2), B});
    check_dir("sh_dty_miss", B, de(10'b0000000110, 0, 1, LT_SH_DTY_MISS, 3));

    // ---- locked: nack
    send(RMISS_REQ, 4, B);
    expect_words("nack", '{hdr(NACK, 0, 4), B});

    // ---- first ack: nothing; last ack: miss_reply_own to 3
    send(INV_ACK, 1, B);
    expect_quiet("first inv_ack", 60);
    send(INV_ACK, 2, B);
    expect_words("miss_reply_own", {hdr(MISS_REPLY_OWN, 0, 3), B, blk});
    check_dir("dirty n3", B, de(10'b0000001000, 1, 0, LT_SH_DTY_MISS, 3));

    // ---- read miss on dirty block: wback_req to 3, then wback -> miss_reply
    send(RMISS_REQ, 1, B);
    expect_words("wback_req", '{hdr(WBACK_REQ, 0, 3), B});
    check_dir("dty_sh", B, de(10'b0000001000, 1, 1, LT_DTY_SH, 1));
    for (int i = 0; i < BW; i++) blk2.push_back(32'hD000_0000 + i);
    send(WBACK, 3, B, blk2);
    expect_words("miss_reply after wback", {hdr(MISS_REPLY, 0, 1), B, blk2});
    check_dir("shared n1 n3", B, de(10'b0000001010, 0, 0, LT_DTY_SH, 1));

    // ---- ownership request with another sharer, then the ack
    send(OWN_REQ, 1, B);
    expect_words("inval for own", '{hdr(INVALIDATION, 0, 3), B});
    send(INV_ACK, 3, B);
    expect_words("own_reply", '{hdr(OWN_REPLY, 0, 1), B});
    check_dir("dirty n1", B, de(10'b0000000010, 1, 0, LT_SH_DTY_OWN, 1));

    // ---- write miss on dirty block: wback_req_own, wback -> miss_reply_own
    send(WMISS_REQ, 2, B);
    expect_words("wback_req_own", '{hdr(WBACK_REQ_OWN, 0, 1), B});
    send(WBACK, 1, B, blk);
    expect_words("miss_reply_own after wback", {hdr(MISS_REPLY_OWN, 0, 2), B, blk});
    check_dir("dirty n2", B, de(10'b0000000100, 1, 0, LT_DTY_DTY, 2));

    // ---- replacement write-back from the owner: nothing sent, uncached
    send(WBACK, 2, B, blk2);
    expect_quiet("replacement wback", 80);
    check_dir("uncached", B, de(10'b0000000000, 0, 0, LT_DTY_DTY, 2));
    send(RBLOCK_REQ, 5, B);
    expect_words("written back data", {hdr(RBLOCK_REPLY, 0, 5), B, blk2});

    // ---- protocol error: ownership request on an uncached block
    checks++;
    if (error) begin failures++; $display("FAIL error set early"); end
    send(OWN_REQ, 1, C);
    expect_quiet("error", 40);
    checks++;
    if (!error) begin failures++; $display("FAIL error not flagged"); end

    // ---- two banks busy at once; a third request for a busy bank blocks
    susp_time[0] = 16'd12;
    send(RMISS_REQ, 1, B);
    send(RMISS_REQ, 1, C);
    send(RMISS_REQ, 2, D2);
    expect_words("overlap B", {hdr(MISS_REPLY, 0, 1), B, blk2});
    expect_words("overlap C", '{hdr(MISS_REPLY, 0, 1), C, 0, 0, 0, 0, 0, 0, 0, 0});
    expect_words("blocked D2", '{hdr(MISS_REPLY, 0, 2), D2, 0, 0, 0, 0, 0, 0, 0, 0});

    checks++;
    if (n_blocked == 0 || max_busy < 2 || n_nack == 0 || n_inval == 0 || n_resume != n_suspend) begin
      failures++;
      $display("FAIL mechanisms: blocked=%0d max_busy=%0d nack=%0d inval=%0d susp=%0d res=%0d",
               n_blocked, max_busy, n_nack, n_inval, n_suspend, n_resume);
    end
    $display("blocked=%0d max_busy=%0d nack=%0d inval=%0d suspend=%0d resume=%0d",
             n_blocked, max_busy, n_nack, n_inval, n_suspend, n_resume);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rpm_board_full: the whole board at its full size (32-word blocks,
// 4,096-word FIFOs, 120-message limit, four banks, a second-level cache of
// 16,384 sets of two 128-byte frames), with no parameter overridden.
//
// A directed sequence with a behavioural DRAM and data SRAM.  Board 2 is
// the home of the test block.  The processor reads a word (the cache misses,
// the home controller answers with the 32-word block from DRAM), reads
// another word of the same block (a hit, no message), and writes a word (an
// ownership request and its reply).  Remote node 5 then read-misses the
// block: the home controller asks the board's cache for a write-back, and
// the reply to node 5 must carry the processor's write.  Remote node 6
// write-misses it: the board's cache is invalidated and acknowledges.
// Finally the processor reads again: a miss, a write-back request to node 6,
// and the data node 6 wrote.
module tb_rpm_board_full;
  import rpm_pkg::*;

  localparam int unsigned BW = 32;
  localparam logic [3:0]  ME = 4'd2;
  localparam int unsigned SLM_AW = $clog2(16384 * 2 * BW);

  logic clk = 0, rst = 1;
  logic [5:0][15:0] susp_time;
  logic life_wr = 0, life_inc = 0, life_rd = 0, life_dec = 0;
  logic [31:0] life_wdata = 0, life_rdata;
  logic life_full, life_empty, life_msg_avail, life_in_overflow, slc_in_overflow;
  logic flc_req = 0, flc_we = 0, flc_done, slc_busy;
  logic [31:0] flc_addr = 0, flc_wdata = 0, flc_rdata;
  logic [SLM_AW-1:0] slm_addr;
  logic slm_we;
  logic [31:0] slm_wdata, slm_rdata;
  logic mem_req, mem_we, mem_ack;
  logic [23:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic [7:0] asi = 8'h0A;
  logic [31:0] paddr = 0;
  logic testmode, addr_err;
  logic [2:0] region;
  logic [12:0] io_sel;
  logic mc_error, nic_error;
  logic [3:0] bank_busy;
  logic [7:0] pclk_phase;
  logic ev_suspend, ev_resume, ev_nack, ev_blocked, ev_inval;

  rpm_board dut (.board_id(ME), .*);
  dram_model #(.AW(24), .LAT(2)) u_dram (.*);

  logic [31:0] slm [logic [SLM_AW-1:0]];
  assign slm_rdata = slm.exists(slm_addr) ? slm[slm_addr] : 32'h0;
  always @(posedge clk) if (slm_we) slm[slm_addr] = slm_wdata;

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  logic [31:0] ltx[$], lrx[$];
  bit ltx_last[$];
  bit l_mid = 0;
  logic [31:0] got[$][$];

  function automatic void fail(string s);
    failures++;
    $display("FAIL t=%0d %s", cycle, s);
  endfunction

  function automatic void post(msg_type_e t, int src, logic [31:0] a, logic [31:0] d[$]);
    logic [31:0] w[$];
    w = {make_hdr(t, 4'(src), ME), a};
    foreach (d[i]) w.push_back(d[i]);
    foreach (w[i]) begin ltx.push_back(w[i]); ltx_last.push_back(i == w.size() - 1); end
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) begin
    life_wr = 0; life_inc = 0; life_rd = 0; life_dec = 0;
    if (!rst) begin
      if (ltx.size() > 0 && !life_full && (l_mid || !life_in_overflow)) begin
        life_wr = 1; life_wdata = ltx.pop_front(); life_inc = ltx_last.pop_front(); l_mid = !life_inc;
      end
      if (!life_empty) begin
        life_rd = 1; lrx.push_back(life_rdata);
        if (lrx.size() == int'(msg_len(msg_type_e'(lrx[0][31:27]), BW))) begin
          life_dec = 1; got.push_back(lrx); lrx.delete();
        end
      end
    end
  end

  task automatic expect_msg(string what, msg_type_e t, int dst, logic [31:0] a, logic [31:0] d[$] = {});
    int tw = 0;
    logic [31:0] m[$];
    while (got.size() == 0 && tw < 20000) begin @(posedge clk); tw++; end
    checks++;
    if (got.size() == 0) begin fail({what, ": no message"}); return; end
    m = got.pop_front();
    if (m[0] != make_hdr(t, ME, 4'(dst)) || m[1] != a) fail($sformatf("%s: got %h %h", what, m[0], m[1]));
    foreach (d[i]) if (m[2 + i] != d[i]) begin fail($sformatf("%s: word %0d %h exp %h", what, i, m[2 + i], d[i])); break; end
  endtask

  // one processor access; returns the cycles it took
  task automatic access(string what, bit we, logic [31:0] a, logic [31:0] d, logic [31:0] exp, output int tw);
    tw = 0;
    @(negedge clk);
    flc_req = 1; flc_we = we; flc_addr = a; flc_wdata = d;
    do begin @(negedge clk); tw++; end while (!flc_done && tw < 20000);
    checks++;
    if (!flc_done) fail({what, ": never completed"});
    else if (!we && flc_rdata != exp) fail($sformatf("%s: read %h exp %h", what, flc_rdata, exp));
    flc_req = 0;
  endtask

  localparam logic [31:0] A = 32'h0400_0100;   // home board 2, block 8
  logic [31:0] blk[$], blk2[$];
  int tw, t_hit, t_miss;

  initial begin
    for (int i = 0; i < 6; i++) susp_time[i] = 16'(10 + 5 * i);
    for (int i = 0; i < BW; i++) begin
      blk.push_back(32'hA000_0000 + 32'(i));
      blk2.push_back(32'h6600_0000 + 32'(i));
      u_dram.poke(24'((A & 32'h01FF_FFFF) >> 2) + 24'(i), blk[i]);
    end
    repeat (5) @(posedge clk);
    rst = 0;
    @(posedge clk);
    while (slc_busy) @(posedge clk);

    access("read miss", 0, A + 32'd8, 0, blk[2], t_miss);
    access("read hit", 0, A + 32'd20, 0, blk[5], t_hit);
    checks++;
    if (t_hit >= t_miss || t_hit > 12) fail($sformatf("hit took %0d cycles, miss %0d", t_hit, t_miss));
    access("write (ownership)", 1, A + 32'd12, 32'h1234_5678, 0, tw);
    blk[3] = 32'h1234_5678;
    access("read own write", 0, A + 32'd12, 0, 32'h1234_5678, tw);

    // remote read: write-back from the board's cache, reply with its data
    post(RMISS_REQ, 5, A, '{});
    expect_msg("miss_reply 5", MISS_REPLY, 5, A, blk);
    // remote write: invalidates the board's copy and node 5's
    post(WMISS_REQ, 6, A, '{});
    expect_msg("inv 5", INVALIDATION, 5, A);
    post(INV_ACK, 5, A, '{});
    expect_msg("miss_reply_own 6", MISS_REPLY_OWN, 6, A, blk);
    // the board reads again: write-back request to node 6, data from node 6
    fork
      access("read after remote write", 0, A + 32'd4, 0, blk2[1], tw);
      begin
        expect_msg("wback_req 6", WBACK_REQ, 6, A);
        post(WBACK, 6, A, blk2);
      end
    join
    repeat (500) @(posedge clk);
    checks++;
    if (mc_error || nic_error || bank_busy != 0) fail("error raised or bank still busy");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

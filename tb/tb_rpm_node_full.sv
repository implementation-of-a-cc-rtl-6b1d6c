// tb_rpm_node_full: the board at its full size (32-word blocks, 4,096-word
// FIFOs, 120-message limit, four banks, 16-bit busy counters), with no
// parameter overridden.
//
// A short directed sequence through the whole path with a behavioural DRAM:
// a remote node writes a block in test mode and reads it back, a remote node
// and the local cache read-miss it (miss replies carry all 32 words), a
// third node write-misses it (invalidations to both sharers, inv_acks, then
// a miss reply with ownership), the local cache read-misses it again (a
// write-back request to the owner, the owner's write-back, then the reply
// with the new data), and a burst of nacks fills the network-side FIFO past
// its message limit.  Replies are compared word by word and the bank delay
// is checked against the busy-time table (in processor clocks of eight
// system clocks).
module tb_rpm_node_full;
  import rpm_pkg::*;

  localparam int unsigned BW = 32;
  localparam logic [3:0]  ME = 4'd2;

  logic clk = 0, rst = 1;
  logic [5:0][15:0] susp_time;
  logic life_wr = 0, life_inc = 0, life_rd = 0, life_dec = 0;
  logic slc_wr = 0, slc_inc = 0, slc_rd = 0, slc_dec = 0;
  logic [31:0] life_wdata = 0, slc_wdata = 0, life_rdata, slc_rdata;
  logic life_full, life_empty, life_msg_avail, life_in_overflow;
  logic slc_full, slc_empty, slc_msg_avail, slc_in_overflow;
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

  rpm_node dut (.board_id(ME), .*);
  dram_model #(.AW(24), .LAT(2)) u_dram (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, n_ovf = 0;
  logic [31:0] ltx[$], stx[$], lrx[$], srx[$];
  bit ltx_last[$], stx_last[$];
  bit l_mid = 0, s_mid = 0, l_pause = 0;
  // received messages, whole
  logic [31:0] got[$][$];

  function automatic void fail(string s);
    failures++;
    $display("FAIL t=%0d %s", cycle, s);
  endfunction

  function automatic void post(bit to_slc, msg_type_e t, int src, logic [31:0] a, logic [31:0] d[$]);
    logic [31:0] w[$];
    w = {make_hdr(t, 4'(src), ME), a};
    foreach (d[i]) w.push_back(d[i]);
    foreach (w[i]) begin
      if (to_slc) begin stx.push_back(w[i]); stx_last.push_back(i == w.size() - 1); end
      else        begin ltx.push_back(w[i]); ltx_last.push_back(i == w.size() - 1); end
    end
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (life_in_overflow) n_ovf++;
  end

  always @(negedge clk) begin
    life_wr = 0; life_inc = 0; slc_wr = 0; slc_inc = 0;
    life_rd = 0; life_dec = 0; slc_rd = 0; slc_dec = 0;
    if (!rst) begin
      if (ltx.size() > 0 && !life_full && (l_mid || !life_in_overflow)) begin
        life_wr = 1; life_wdata = ltx.pop_front(); life_inc = ltx_last.pop_front(); l_mid = !life_inc;
      end
      if (stx.size() > 0 && !slc_full && (s_mid || !slc_in_overflow)) begin
        slc_wr = 1; slc_wdata = stx.pop_front(); slc_inc = stx_last.pop_front(); s_mid = !slc_inc;
      end
      if (!life_empty && !l_pause) begin
        life_rd = 1; lrx.push_back(life_rdata);
        if (lrx.size() == int'(msg_len(msg_type_e'(lrx[0][31:27]), BW))) begin
          life_dec = 1; got.push_back(lrx); lrx.delete();
        end
      end
      if (!slc_empty) begin
        slc_rd = 1; srx.push_back(slc_rdata);
        if (srx.size() == int'(msg_len(msg_type_e'(srx[0][31:27]), BW))) begin
          slc_dec = 1; got.push_back(srx); srx.delete();
        end
      end
    end
  end

  // wait for one message and compare header, address and (optionally) data
  task automatic expect_msg(string what, msg_type_e t, int dst, logic [31:0] a,
                            logic [31:0] d[$] = {}, int min_cycles = 0);
    int tw = 0;
    logic [31:0] m[$];
    while (got.size() == 0 && tw < 20000) begin @(posedge clk); tw++; end
    checks++;
    if (got.size() == 0) begin fail({what, ": no message"}); return; end
    m = got.pop_front();
    if (m[0] != make_hdr(t, ME, 4'(dst)) || m[1] != a)
      fail($sformatf("%s: got %h %h", what, m[0], m[1]));
    foreach (d[i]) if (m[2 + i] != d[i]) begin fail($sformatf("%s: word %0d %h exp %h", what, i, m[2 + i], d[i])); break; end
    if (tw < min_cycles) fail($sformatf("%s: after %0d cycles, bank delay is %0d", what, tw, min_cycles));
  endtask

  logic [31:0] blk[$], blk2[$];
  localparam logic [31:0] A = 32'h0001_0080;   // block 0x804

  initial begin
    for (int i = 0; i < 6; i++) susp_time[i] = 16'(10 + 5 * i);
    for (int i = 0; i < BW; i++) begin blk.push_back(32'hF000_0000 + 32'(i)); blk2.push_back(32'h0BAD_0000 + 32'(i)); end
    repeat (5) @(posedge clk);
    rst = 0;

    // test mode block write and read back
    post(0, WBLOCK_REQ, 5, A, blk);
    repeat (200) @(posedge clk);
    post(0, RBLOCK_REQ, 5, A, '{});
    expect_msg("rblock", RBLOCK_REPLY, 5, A, blk);

    // two readers: remote node 5, local cache (node 2); class A busy time
    post(0, RMISS_REQ, 5, A, '{});
    expect_msg("rmiss 5", MISS_REPLY, 5, A, blk, 10 * 8);
    post(1, RMISS_REQ, 2, A, '{});
    expect_msg("rmiss 2", MISS_REPLY, 2, A, blk);

    // node 7 write-misses: invalidations to 2 and 5, acks, then ownership
    post(0, WMISS_REQ, 7, A, '{});
    expect_msg("inv a", INVALIDATION, 2, A);
    expect_msg("inv b", INVALIDATION, 5, A);
    post(1, INV_ACK, 2, A, '{});
    post(0, INV_ACK, 5, A, '{});
    expect_msg("miss_reply_own 7", MISS_REPLY_OWN, 7, A, blk);

    // local cache reads it again: write-back request to 7, write-back, reply
    post(1, RMISS_REQ, 2, A, '{});
    expect_msg("wback_req 7", WBACK_REQ, 7, A);
    post(0, WBACK, 7, A, blk2);
    expect_msg("miss_reply 2", MISS_REPLY, 2, A, blk2);
    repeat (1000) @(posedge clk);
    checks++;
    if (bank_busy != 0 || mc_error || nic_error) fail("controller not idle or error raised");

    // message limit: node 9 write-misses and its invalidations stay
    // unacknowledged, so the entry stays locked; 300 read misses from node 4
    // are nacked while the network-side reader is stopped, the nacks back up
    // and the writer has to wait at 120 messages
    post(0, WMISS_REQ, 9, A, '{});
    expect_msg("inv c", INVALIDATION, 2, A);
    expect_msg("inv d", INVALIDATION, 7, A);
    got.delete();
    l_pause = 1;
    for (int i = 0; i < 300; i++) post(0, RMISS_REQ, 4, A, '{});
    repeat (30000) @(posedge clk);
    l_pause = 0;
    repeat (30000) @(posedge clk);
    checks++;
    if (n_ovf == 0 || got.size() != 300) fail($sformatf("overflow run: %0d cycles at limit, %0d nacks", n_ovf, got.size()));
    foreach (got[i]) if (got[i][0] != make_hdr(NACK, ME, 4'd4)) begin fail("expected nack"); break; end

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

// tb_rpm_node: end-to-end test of one board (network interface, FIFOs,
// memory/directory controller, phase sequencer, address mapper) with a
// behavioural DRAM.
//
// The testbench plays every cache in a ten-node machine whose home for all
// test blocks is this board (id 1).  Node 1 is the local second-level cache
// and talks through the slc_* port; nodes 0 and 2..9 are remote and talk
// through the life_* port as the network chip would.  Each cache model keeps
// a state per block (invalid, shared, dirty), issues read and write misses,
// evicts dirty blocks with write-backs, answers invalidations with inv_acks
// and write-back requests with write-backs, and retries after a nack.  Every
// block carries a value that the current owner changes when it gets the
// block dirty; every miss reply must carry the latest value, which checks
// coherence across the whole path.  Readers pause now and then so that the
// message counters reach their limit and the interface has to wait.
//
// After the random phase the DRAM contents and directory entries are
// checked, then directed cases cover what the random traffic does not:
// ownership requests with and without other sharers, test-mode word and
// block access, routing of a request for a remote home to the network chip,
// a misaddressed message dropped by the interface, a protocol error in the
// controller, and the address mapper.  Each mechanism is counted and the
// test fails if any count stays zero.  Block size, FIFO depth and message
// limit are reduced (8 words, 64 words, 4 messages) to keep the run short.
module tb_rpm_node;
  import rpm_pkg::*;

  localparam int unsigned BW    = 8;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned MAXM  = 4;
  localparam int unsigned NB    = 4;
  localparam int          NN    = 10;
  localparam int          NBLK  = 6;
  localparam logic [3:0]  ME    = 4'd1;
  localparam logic [23:0] DIR_BASE = 24'h80_0000;

  logic clk = 0, rst = 1;
  logic [5:0][7:0] susp_time;
  logic life_wr = 0, life_inc = 0, life_rd = 0, life_dec = 0;
  logic slc_wr = 0, slc_inc = 0, slc_rd = 0, slc_dec = 0;
  logic [31:0] life_wdata = 0, slc_wdata = 0, life_rdata, slc_rdata;
  logic life_full, life_empty, life_msg_avail, life_in_overflow;
  logic slc_full, slc_empty, slc_msg_avail, slc_in_overflow;
  logic mem_req, mem_we, mem_ack;
  logic [23:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic [7:0] asi = 0;
  logic [31:0] paddr = 0;
  logic testmode, addr_err;
  logic [2:0] region;
  logic [12:0] io_sel;
  logic mc_error, nic_error;
  logic [NB-1:0] bank_busy;
  logic [7:0] pclk_phase;
  logic ev_suspend, ev_resume, ev_nack, ev_blocked, ev_inval;

  rpm_node #(.BLOCK_WORDS(BW), .FIFO_DEPTH(DEPTH), .MAX_MSGS(MAXM), .NBANKS(NB),
             .CNT_W(8), .MEM_AW(24)) dut (.board_id(ME), .*);

  dram_model #(.AW(24), .LAT(2)) u_dram (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;

  // mechanism counters
  int n_suspend = 0, n_resume = 0, n_nack = 0, n_inval = 0, n_blocked = 0, max_busy = 0;
  int n_life_ovf = 0, n_slc_ovf = 0, n_nic_wait = 0, n_retry = 0, n_evict = 0;
  int n_wbreq = 0, n_wbreq_own = 0, n_stale_wbreq = 0, n_own_reply = 0, n_miss_reply = 0;
  int n_miss_own = 0, n_testmode = 0, n_remote = 0, n_nic_err = 0, n_mc_err = 0, n_map = 0;

  function automatic void fail(string s);
    failures++;
    $display("FAIL t=%0d %s", cycle, s);
  endfunction

  // ---------------------------------------------------------------- send side
  logic [31:0] ltx_w[$], stx_w[$];
  bit          ltx_last[$], stx_last[$];
  bit          l_mid = 0, s_mid = 0;

  function automatic void post(bit to_slc, logic [31:0] h, logic [31:0] a, logic [31:0] data[$]);
    logic [31:0] w[$];
    w = {h, a};
    foreach (data[i]) w.push_back(data[i]);
    foreach (w[i]) begin
      if (to_slc) begin stx_w.push_back(w[i]); stx_last.push_back(i == w.size() - 1); end
      else        begin ltx_w.push_back(w[i]); ltx_last.push_back(i == w.size() - 1); end
    end
  endfunction

  function automatic logic [31:0] baddr(int b);
    return 32'(b * BW * 4);
  endfunction

  function automatic void node_send(int n, msg_type_e t, int b, logic [31:0] d0 = 0);
    logic [31:0] data[$];
    if (t == WBACK) for (int i = 0; i < BW; i++) data.push_back(d0 + 32'(i));
    post(n == int'(ME), make_hdr(t, 4'(n), ME), baddr(b), data);
  endfunction

  // ------------------------------------------------------------- cache models
  int          st   [NN][NBLK];   // 0 invalid, 1 shared, 2 dirty
  bit          pend [NN][NBLK];
  msg_type_e   ptype[NN][NBLK];
  int          retry[NN][NBLK];
  logic [31:0] val  [NN][NBLK];
  logic [31:0] golden[NBLK];
  int          uniq = 100;
  bit          random_mode = 0, gen_on = 0;

  // directed-phase receive queues
  logic [31:0] rx_h[$], rx_a[$], rx_d0[$];
  bit          rx_port[$];        // 1 = slc port

  function automatic void node_rx(bit from_slc, logic [31:0] words[$]);
    msg_hdr_t h;
    int n, b;
    h = msg_hdr_t'(words[0]);
    n = int'(h.dst);
    b = int'(words[1]) / int'(BW * 4);
    if (from_slc != (h.dst == ME)) fail($sformatf("message for node %0d on wrong port", n));
    if (!random_mode) begin
      rx_h.push_back(words[0]); rx_a.push_back(words[1]);
      rx_d0.push_back(words.size() > 2 ? words[2] : 32'h0); rx_port.push_back(from_slc);
      return;
    end
    if (n >= NN || b >= NBLK) begin fail("reply for unknown node or block"); return; end
    checks++;
    case (h.mtype)
      MISS_REPLY: begin
        n_miss_reply++;
        if (!pend[n][b] || ptype[n][b] != RMISS_REQ) fail($sformatf("unexpected miss_reply n%0d b%0d", n, b));
        else if (words[2] != golden[b]) fail($sformatf("stale data n%0d b%0d: %h exp %h", n, b, words[2], golden[b]));
        else begin st[n][b] = 1; pend[n][b] = 0; end
      end
      MISS_REPLY_OWN: begin
        n_miss_own++;
        if (!pend[n][b] || ptype[n][b] != WMISS_REQ) fail($sformatf("unexpected miss_reply_own n%0d b%0d", n, b));
        else if (words[2] != golden[b]) fail($sformatf("stale data n%0d b%0d: %h exp %h", n, b, words[2], golden[b]));
        else begin
          for (int m = 0; m < NN; m++)
            if (m != n && st[m][b] != 0) fail($sformatf("node %0d still holds b%0d when %0d gets it dirty", m, b, n));
          st[n][b] = 2; pend[n][b] = 0;
          uniq++; golden[b] = 32'(uniq); val[n][b] = 32'(uniq);
        end
      end
      INVALIDATION: begin
        if (st[n][b] == 2) fail($sformatf("invalidation to dirty owner n%0d b%0d", n, b));
        st[n][b] = 0;
        node_send(n, INV_ACK, b);
      end
      WBACK_REQ, WBACK_REQ_OWN: begin
        if (h.mtype == WBACK_REQ) n_wbreq++; else n_wbreq_own++;
        if (st[n][b] == 2) begin
          node_send(n, WBACK, b, val[n][b]);
          st[n][b] = (h.mtype == WBACK_REQ) ? 1 : 0;
        end else n_stale_wbreq++;   // already evicted; the write-back is on its way
      end
      NACK: begin
        if (!pend[n][b]) fail($sformatf("unexpected nack n%0d b%0d", n, b));
        retry[n][b] = $urandom_range(40, 200);
      end
      default: fail($sformatf("unexpected message type %0d", h.mtype));
    endcase
  endfunction

  // ------------------------------------------------------------- port driver
  logic [31:0] lrx[$], srx[$];
  bit          l_pause = 0, s_pause = 0;

  always @(negedge clk) begin
    int n, b;
    life_wr = 0; life_inc = 0; slc_wr = 0; slc_inc = 0;
    life_rd = 0; life_dec = 0; slc_rd = 0; slc_dec = 0;
    if (!rst) begin
      if (ltx_w.size() > 0 && !life_full && (l_mid || !life_in_overflow)) begin
        life_wr = 1; life_wdata = ltx_w.pop_front(); life_inc = ltx_last.pop_front(); l_mid = !life_inc;
      end
      if (stx_w.size() > 0 && !slc_full && (s_mid || !slc_in_overflow)) begin
        slc_wr = 1; slc_wdata = stx_w.pop_front(); slc_inc = stx_last.pop_front(); s_mid = !slc_inc;
      end
      if (!life_empty && !l_pause) begin
        life_rd = 1; lrx.push_back(life_rdata);
        if (lrx.size() == int'(msg_len(msg_type_e'(lrx[0][31:27]), BW))) begin
          life_dec = 1; node_rx(0, lrx); lrx.delete();
        end
      end
      if (!slc_empty && !s_pause) begin
        slc_rd = 1; srx.push_back(slc_rdata);
        if (srx.size() == int'(msg_len(msg_type_e'(srx[0][31:27]), BW))) begin
          slc_dec = 1; node_rx(1, srx); srx.delete();
        end
      end
      // retries after nacks
      for (int i = 0; i < NN; i++)
        for (int j = 0; j < NBLK; j++)
          if (retry[i][j] > 0) begin
            retry[i][j]--;
            if (retry[i][j] == 0) begin n_retry++; node_send(i, ptype[i][j], j); end
          end
      // new requests
      if (gen_on && $urandom_range(9) == 0) begin
        n = $urandom_range(NN - 1);
        b = $urandom_range(NBLK - 1);
        if (!pend[n][b] && retry[n][b] == 0) begin
          if (st[n][b] == 2) begin
            if ($urandom_range(2) == 0) begin
              n_evict++; node_send(n, WBACK, b, val[n][b]); st[n][b] = 0;
            end
          end else if (st[n][b] == 0 || $urandom_range(1) == 0) begin
            ptype[n][b] = (st[n][b] == 0 && $urandom_range(1) == 0) ? RMISS_REQ : WMISS_REQ;
            pend[n][b]  = 1;
            node_send(n, ptype[n][b], b);
          end
        end
      end
    end
  end

  // -------------------------------------------------------------- monitors
  logic nic_err_q = 0, mc_err_q = 0, lovf_q = 0, sovf_q = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      if (ev_suspend) n_suspend++;
      if (ev_resume)  n_resume++;
      if (ev_nack)    n_nack++;
      if (ev_inval)   n_inval++;
      if (ev_blocked) n_blocked++;
      if ($countones(bank_busy) > max_busy) max_busy = $countones(bank_busy);
      if (life_in_overflow && !lovf_q) n_life_ovf++;
      if (slc_in_overflow && !sovf_q) n_slc_ovf++;
      if (|dut.u_nic.out_overflow) n_nic_wait++;
      if (nic_error && !nic_err_q) n_nic_err++;
      if (mc_error && !mc_err_q) n_mc_err++;
      if ($countones(pclk_phase) != 1) fail("phase register not one-hot");
    end
    lovf_q <= life_in_overflow; sovf_q <= slc_in_overflow;
    nic_err_q <= nic_error; mc_err_q <= mc_error;
  end

  // reader pauses: long enough to fill the message counters
  initial begin
    forever begin
      repeat ($urandom_range(1500, 3000)) @(posedge clk);
      if ($urandom_range(1)) l_pause = 1; else s_pause = 1;
      repeat ($urandom_range(300, 600)) @(posedge clk);
      l_pause = 0; s_pause = 0;
    end
  end

  // ---------------------------------------------------------- directed helpers
  task automatic wait_rx(int k, int timeout = 20000);
    int t = 0;
    while (rx_h.size() < k && t < timeout) begin @(posedge clk); t++; end
    if (rx_h.size() < k) fail($sformatf("timeout waiting for %0d messages, have %0d", k, rx_h.size()));
  endtask

  task automatic expect_rx(string what, msg_type_e t, int dst, logic [31:0] a, logic [31:0] d0 = 0, bit chk_d = 0);
    msg_hdr_t h;
    wait_rx(1);
    checks++;
    if (rx_h.size() == 0) return;
    h = msg_hdr_t'(rx_h.pop_front());
    if (h.mtype != t || int'(h.dst) != dst || rx_a[0] != a || (chk_d && rx_d0[0] != d0))
      fail($sformatf("%s: got type %0d dst %0d addr %h d0 %h", what, h.mtype, h.dst, rx_a[0], rx_d0[0]));
    void'(rx_a.pop_front()); void'(rx_d0.pop_front()); void'(rx_port.pop_front());
  endtask

  task automatic settle(int cycles = 400);
    int quiet = 0, t = 0;
    while (quiet < cycles && t < 200000) begin
      @(posedge clk); t++;
      if (ltx_w.size() == 0 && stx_w.size() == 0 && life_empty && slc_empty && bank_busy == 0 &&
          !dut.u_nic.busy && dut.u_mc.state == '0)
        quiet++;
      else quiet = 0;
    end
  endtask

  function automatic dir_entry_t dir_of(int b);
    return dir_entry_t'(u_dram.peek(DIR_BASE | 24'(b))[17:0]);
  endfunction

  task automatic probe_map(logic [7:0] a, logic [31:0] ad, logic tm, logic [2:0] r, logic err);
    asi = a; paddr = ad;
    @(posedge clk);
    checks++; n_map++;
    if (testmode != tm || addr_err != err || (tm && !err && region != r))
      fail($sformatf("mapper asi %h addr %h", a, ad));
  endtask

  // ----------------------------------------------------------------- stimulus
  initial begin
    int busy_nodes;
    dir_entry_t e;
    for (int i = 0; i < 6; i++) susp_time[i] = 8'(1 + i % 3);
    for (int b = 0; b < NBLK; b++) golden[b] = 0;
    for (int i = 0; i < NN; i++)
      for (int j = 0; j < NBLK; j++) begin st[i][j] = 0; pend[i][j] = 0; retry[i][j] = 0; val[i][j] = 0; end
    repeat (5) @(posedge clk);
    rst = 0;

    // ------------------------------------------------- random coherence phase
    random_mode = 1; gen_on = 1;
    repeat (40000) @(posedge clk);
    gen_on = 0;
    begin
      int t = 0;
      do begin
        @(posedge clk); t++;
        busy_nodes = 0;
        for (int i = 0; i < NN; i++) for (int j = 0; j < NBLK; j++) busy_nodes += pend[i][j];
      end while (busy_nodes != 0 && t < 100000);
      if (busy_nodes != 0) fail($sformatf("%0d requests never completed", busy_nodes));
    end
    settle();
    if (mc_error || nic_error) fail("error raised by legal traffic");
    for (int b = 0; b < NBLK; b++) begin
      int owner;
      owner = -1;
      for (int i = 0; i < NN; i++) if (st[i][b] == 2) owner = i;
      e = dir_of(b);
      checks++;
      if (e.locked) fail($sformatf("block %0d left locked", b));
      if (owner >= 0) begin
        if (!e.dbit || e.pbits != (10'b1 << owner)) fail($sformatf("block %0d dir %h, owner %0d", b, e, owner));
      end else begin
        if (e.dbit) fail($sformatf("block %0d dirty without owner", b));
        if (u_dram.peek(24'(b * BW)) != golden[b]) fail($sformatf("block %0d memory %h exp %h", b, u_dram.peek(24'(b * BW)), golden[b]));
        for (int i = 0; i < NN; i++)
          if (st[i][b] == 1 && !e.pbits[i]) fail($sformatf("block %0d sharer %0d missing", b, i));
      end
    end
    random_mode = 0;

    // ---------------------------------------------------- ownership requests
    // block 10 (fresh): nodes 2 and 1 read it, node 2 asks for ownership
    // (invalidation to 1, ack, own_reply), then node 2 evicts it, node 3
    // reads it and asks for ownership alone (own_reply at once).
    node_send(2, RMISS_REQ, 10);
    expect_rx("rmiss 2", MISS_REPLY, 2, baddr(10));
    node_send(1, RMISS_REQ, 10);
    expect_rx("rmiss 1", MISS_REPLY, 1, baddr(10));
    node_send(2, OWN_REQ, 10);
    expect_rx("inv 1", INVALIDATION, 1, baddr(10));
    node_send(7, RMISS_REQ, 10);
    expect_rx("nack while locked", NACK, 7, baddr(10));
    node_send(1, INV_ACK, 10);
    expect_rx("own_reply 2", OWN_REPLY, 2, baddr(10));
    n_own_reply++;
    node_send(2, WBACK, 10, 32'hCAFE_0000);
    node_send(3, RMISS_REQ, 10);
    expect_rx("rmiss 3", MISS_REPLY, 3, baddr(10), 32'hCAFE_0000, 1);
    node_send(3, OWN_REQ, 10);
    expect_rx("own_reply 3", OWN_REPLY, 3, baddr(10));
    n_own_reply++;
    settle();
    e = dir_of(10);
    checks++;
    if (e.locked || !e.dbit || e.pbits != 10'b1000) fail($sformatf("block 10 dir %h", e));

    // ------------------------------------------------------------ test mode
    post(1, make_hdr(WWORD_REQ, ME, ME), 32'h0000_4004, '{32'h1234_5678});
    settle(50);
    post(0, make_hdr(RWORD_REQ, 4'd5, ME), 32'h0000_4004, '{});
    expect_rx("rword", RWORD_REPLY, 5, 32'h0000_4004, 32'h1234_5678, 1);
    begin
      logic [31:0] d[$];
      for (int i = 0; i < BW; i++) d.push_back(32'hB000 + 32'(i));
      post(0, make_hdr(WBLOCK_REQ, 4'd6, ME), 32'h0000_8000, d);
    end
    settle(50);
    post(1, make_hdr(RBLOCK_REQ, ME, ME), 32'h0000_8000, '{});
    expect_rx("rblock", RBLOCK_REPLY, 1, 32'h0000_8000, 32'hB000, 1);
    n_testmode += 2;
    checks++;
    if (u_dram.peek(24'h1001) != 32'h1234_5678 || u_dram.peek(24'h2007) != 32'hB007) fail("test-mode writes not in DRAM");

    // ------------------------------------- request for another home: routed out
    post(1, make_hdr(RMISS_REQ, ME, 4'd6), 32'h0000_0100, '{});
    wait_rx(1);
    checks++;
    if (rx_h.size() > 0) begin
      if (rx_h[0] != make_hdr(RMISS_REQ, ME, 4'd6) || rx_port[0] != 0) fail("remote request not passed to network");
      else n_remote++;
      void'(rx_h.pop_front()); void'(rx_a.pop_front()); void'(rx_d0.pop_front()); void'(rx_port.pop_front());
    end

    // ---------------------------- misaddressed message from the network: dropped
    post(0, make_hdr(MISS_REPLY, 4'd4, 4'd3), 32'h0, '{0, 1, 2, 3, 4, 5, 6, 7});
    settle(100);
    checks++;
    if (n_nic_err == 0 || rx_h.size() != 0) fail("misaddressed message not dropped");
    node_send(4, RMISS_REQ, 11);   // traffic still flows afterwards
    expect_rx("after drop", MISS_REPLY, 4, baddr(11));

    // ------------------------------------------------- address mapper probes
    probe_map(8'h01, 32'h0200_0000, 1, 1, 0);
    probe_map(8'h02, 32'h050_0000, 1, 2, 0);
    probe_map(8'h03, 32'h200_0000, 1, 0, 1);
    probe_map(8'h0A, 32'h100, 0, 0, 0);
    asi = 8'h05; paddr = 32'h0030_0000;
    @(posedge clk);
    checks++;
    if (io_sel != 13'b1000) fail("io select");

    // ------------------------------------------ protocol error in controller
    node_send(5, WBACK, 12, 32'h0);  // write-back of a block nobody holds
    settle(100);
    checks++;
    if (n_mc_err == 0) fail("protocol error not flagged");

    // ------------------------------------------------------ mechanism counts
    $display("suspend %0d resume %0d nack %0d inval %0d blocked %0d max_busy %0d",
             n_suspend, n_resume, n_nack, n_inval, n_blocked, max_busy);
    $display("life_ovf %0d slc_ovf %0d nic_wait %0d retry %0d evict %0d wbreq %0d wbreq_own %0d stale %0d",
             n_life_ovf, n_slc_ovf, n_nic_wait, n_retry, n_evict, n_wbreq, n_wbreq_own, n_stale_wbreq);
    $display("miss_reply %0d miss_own %0d own_reply %0d testmode %0d remote %0d nic_err %0d mc_err %0d map %0d",
             n_miss_reply, n_miss_own, n_own_reply, n_testmode, n_remote, n_nic_err, n_mc_err, n_map);
    checks++;
    if (n_suspend == 0 || n_resume == 0 || n_nack == 0 || n_inval == 0 || n_blocked == 0 ||
        max_busy < 2 || n_life_ovf == 0 || n_slc_ovf == 0 || n_nic_wait == 0 || n_retry == 0 ||
        n_evict == 0 || n_wbreq == 0 || n_wbreq_own == 0 || n_own_reply == 0 || n_miss_reply == 0 ||
        n_miss_own == 0 || n_testmode == 0 || n_remote == 0 || n_nic_err == 0 || n_mc_err == 0 ||
        n_map == 0)
      fail("some mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

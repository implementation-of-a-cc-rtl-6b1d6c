// tb_rpm_board: end-to-end test of a whole board: network interface, FIFOs,
// memory/directory controller and second-level cache controller, with a
// behavioural DRAM and a behavioural data SRAM for the cache.
//
// The board is node 1 and the home of every test block.  A processor model
// issues random reads and writes through the first-level cache request port.
// Nine remote cache models (nodes 0 and 2..9) talk through the network-chip
// port: each keeps a state per block, issues read and write misses, evicts
// dirty blocks, answers invalidations and write-back requests, and retries
// after a nack.  Every word of every block has a golden value, which the
// holder of the dirty copy changes: the processor on each write, a remote
// node when it gets ownership.  Every read by the processor and every miss
// reply to a remote node must carry the golden values, which checks
// coherence through the cache controller, the interface and the directory.
// With four sets of two frames and twelve blocks, the cache has to evict,
// and write dirty victims back.  Network-side reader pauses drive the
// message limits.  Each mechanism is counted, and the test fails if any
// count stays zero.  Sizes are reduced: 8-word blocks, 64-word FIFOs, a
// limit of 4 messages, and a cache of 4 sets.
module tb_rpm_board;
  import rpm_pkg::*;

  localparam int unsigned BW    = 8;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned MAXM  = 4;
  localparam int unsigned NB    = 4;
  localparam int unsigned SETS  = 4;
  localparam int unsigned WAYS  = 2;
  localparam int          NN    = 10;
  localparam int          NBLK  = 12;
  localparam logic [3:0]  ME    = 4'd1;
  localparam int unsigned SLM_AW = $clog2(SETS * WAYS * BW);

  logic clk = 0, rst = 1;
  logic [5:0][7:0] susp_time;
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
  logic [7:0] asi = 0;
  logic [31:0] paddr = 0;
  logic testmode, addr_err;
  logic [2:0] region;
  logic [12:0] io_sel;
  logic mc_error, nic_error;
  logic [NB-1:0] bank_busy;
  logic [7:0] pclk_phase;
  logic ev_suspend, ev_resume, ev_nack, ev_blocked, ev_inval;

  rpm_board #(.BLOCK_WORDS(BW), .FIFO_DEPTH(DEPTH), .MAX_MSGS(MAXM), .NBANKS(NB),
              .CNT_W(8), .MEM_AW(24), .SLC_SETS(SETS), .SLC_ASSOC(WAYS)) dut (.board_id(ME), .*);

  dram_model #(.AW(24), .LAT(2)) u_dram (.*);

  // data SRAM of the second-level cache
  logic [31:0] slm [SETS*WAYS*BW];
  assign slm_rdata = slm[slm_addr];
  always @(posedge clk) if (slm_we) slm[slm_addr] <= slm_wdata;

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int n_suspend = 0, n_resume = 0, n_nack = 0, n_inval = 0, n_blocked = 0, n_ovf = 0;
  int n_rd = 0, n_wr = 0, n_rmiss = 0, n_wmiss = 0, n_own = 0, n_victim_wb = 0;
  int n_req_wb = 0, n_inv_ack = 0, n_slc_nack = 0, n_par_wait = 0, n_remote_retry = 0;

  function automatic void fail(string s);
    failures++;
    $display("FAIL t=%0d %s", cycle, s);
  endfunction

  function automatic logic [31:0] baddr(int b);
    return 32'h0200_0000 + 32'(b * BW * 4);
  endfunction

  // golden value of each word
  logic [31:0] golden [NBLK][BW];
  int          uniq = 1000;

  // -------------------------------------------------- remote cache models
  logic [31:0] ltx_w[$];
  bit          ltx_last[$];
  bit          l_mid = 0, l_pause = 0, gen_on = 0;
  int          st   [NN][NBLK];
  bit          pend [NN][NBLK];
  msg_type_e   ptype[NN][NBLK];
  int          retry[NN][NBLK];
  logic [31:0] val  [NN][NBLK][BW];

  function automatic void node_send(int n, msg_type_e t, int b);
    logic [31:0] w[$];
    w = {make_hdr(t, 4'(n), ME), baddr(b)};
    if (t == WBACK) for (int i = 0; i < BW; i++) w.push_back(val[n][b][i]);
    foreach (w[i]) begin ltx_w.push_back(w[i]); ltx_last.push_back(i == w.size() - 1); end
  endfunction

  function automatic void node_rx(logic [31:0] words[$]);
    msg_hdr_t h;
    int n, b;
    h = msg_hdr_t'(words[0]);
    n = int'(h.dst);
    b = (int'(words[1] - 32'h0200_0000)) / int'(BW * 4);
    checks++;
    if (n >= NN || n == int'(ME) || b < 0 || b >= NBLK) begin fail("message for unknown node or block"); return; end
    case (h.mtype)
      MISS_REPLY, MISS_REPLY_OWN: begin
        if (!pend[n][b] || (ptype[n][b] == RMISS_REQ) != (h.mtype == MISS_REPLY))
          fail($sformatf("unexpected reply %0d n%0d b%0d", h.mtype, n, b));
        for (int i = 0; i < BW; i++)
          if (words[2 + i] != golden[b][i]) begin
            fail($sformatf("stale data n%0d b%0d w%0d: %h exp %h", n, b, i, words[2 + i], golden[b][i]));
            break;
          end
        pend[n][b] = 0;
        st[n][b] = (h.mtype == MISS_REPLY) ? 1 : 2;
        for (int i = 0; i < BW; i++) val[n][b][i] = golden[b][i];
        if (h.mtype == MISS_REPLY_OWN) begin
          uniq++;
          for (int i = 0; i < BW; i++) begin val[n][b][i] = 32'(uniq * 16 + i); golden[b][i] = val[n][b][i]; end
        end
      end
      INVALIDATION: begin
        if (st[n][b] == 2) fail($sformatf("invalidation to dirty owner n%0d b%0d", n, b));
        st[n][b] = 0;
        node_send(n, INV_ACK, b);
      end
      WBACK_REQ, WBACK_REQ_OWN: if (st[n][b] == 2) begin
        node_send(n, WBACK, b);
        st[n][b] = (h.mtype == WBACK_REQ) ? 1 : 0;
      end
      NACK: begin
        if (!pend[n][b]) fail($sformatf("unexpected nack n%0d b%0d", n, b));
        retry[n][b] = $urandom_range(100, 400);
      end
      default: fail($sformatf("unexpected message type %0d", h.mtype));
    endcase
  endfunction

  logic [31:0] lrx[$];
  always @(negedge clk) begin
    int n, b;
    life_wr = 0; life_inc = 0; life_rd = 0; life_dec = 0;
    if (!rst) begin
      if (ltx_w.size() > 0 && !life_full && (l_mid || !life_in_overflow)) begin
        life_wr = 1; life_wdata = ltx_w.pop_front(); life_inc = ltx_last.pop_front(); l_mid = !life_inc;
      end
      if (!life_empty && !l_pause) begin
        life_rd = 1; lrx.push_back(life_rdata);
        if (lrx.size() == int'(msg_len(msg_type_e'(lrx[0][31:27]), BW))) begin
          life_dec = 1; node_rx(lrx); lrx.delete();
        end
      end
      for (int i = 0; i < NN; i++)
        for (int j = 0; j < NBLK; j++)
          if (retry[i][j] > 0) begin
            retry[i][j]--;
            if (retry[i][j] == 0) begin n_remote_retry++; node_send(i, ptype[i][j], j); end
          end
      if (gen_on && $urandom_range(39) == 0) begin
        n = $urandom_range(NN - 1);
        b = $urandom_range(NBLK - 1);
        // a remote node has at most one miss outstanding
        if (n != int'(ME) && !pend[n].or() && !pend[n][b] && retry[n][b] == 0) begin
          if (st[n][b] == 2) begin
            if ($urandom_range(2) == 0) begin node_send(n, WBACK, b); st[n][b] = 0; end
          end else if (st[n][b] == 0 || $urandom_range(1) == 0) begin
            ptype[n][b] = (st[n][b] == 0 && $urandom_range(1) == 0) ? RMISS_REQ : WMISS_REQ;
            pend[n][b]  = 1;
            node_send(n, ptype[n][b], b);
          end
        end
      end
    end
  end

  // --------------------------------------------------------- processor
  task automatic access(bit we, int b, int w);
    int t = 0;
    logic [31:0] d;
    d = 32'(uniq * 16 + 7);
    uniq++;
    @(negedge clk);
    flc_req = 1; flc_we = we; flc_addr = baddr(b) + 32'(w * 4); flc_wdata = d;
    do begin @(negedge clk); t++; end while (!flc_done && t < 50000);
    checks++;
    if (!flc_done) fail($sformatf("access b%0d w%0d never completed", b, w));
    else if (we) begin golden[b][w] = d; n_wr++; end
    else begin
      n_rd++;
      if (flc_rdata != golden[b][w]) fail($sformatf("read b%0d w%0d: %h exp %h", b, w, flc_rdata, golden[b][w]));
    end
    flc_req = 0;
  endtask

  // -------------------------------------------------------------- monitors
  logic err_q = 0, ovf_q = 0, par_q = 0, som_w = 1, som_r = 1;   // next word starts a message
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      if (ev_suspend) n_suspend++;
      if (ev_resume)  n_resume++;
      if (ev_nack)    n_nack++;
      if (ev_inval)   n_inval++;
      if (ev_blocked) n_blocked++;
      if ((life_in_overflow || slc_in_overflow) && !ovf_q) n_ovf++;
      if (dut.u_slcc.par_valid && !par_q) n_par_wait++;
      if ((mc_error || nic_error) && !err_q) fail("error raised");
      // messages written by the cache controller: count their headers
      if (dut.slc_wr && som_w)
        case (msg_type_e'(dut.slc_wdata[31:27]))
          RMISS_REQ: n_rmiss++;
          WMISS_REQ: n_wmiss++;
          OWN_REQ:   n_own++;
          INV_ACK:   n_inv_ack++;
          WBACK:     if (dut.u_slcc.is_msg) n_req_wb++; else n_victim_wb++;
          default:   fail("cache controller sent an unexpected type");
        endcase
      if (dut.slc_rd && som_r && msg_type_e'(dut.slc_rdata[31:27]) == NACK)
        n_slc_nack++;
    end
    ovf_q <= life_in_overflow || slc_in_overflow;
    err_q <= mc_error || nic_error;
    par_q <= dut.u_slcc.par_valid;
    if (dut.slc_wr) som_w <= dut.slc_inc;
    if (dut.slc_rd) som_r <= dut.slc_dec;
  end

  initial begin
    forever begin
      repeat ($urandom_range(1500, 3000)) @(posedge clk);
      l_pause = 1;
      repeat ($urandom_range(300, 600)) @(posedge clk);
      l_pause = 0;
    end
  end

  task automatic check_count(string what, int n);
    checks++;
    if (n == 0) fail({what, " never happened"});
  endtask

  initial begin
    for (int i = 0; i < 6; i++) susp_time[i] = 8'(2 + i);
    foreach (slm[i]) slm[i] = '0;
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < BW; i++) begin
        golden[b][i] = 32'(b * 256 + i);
        u_dram.poke(24'((baddr(b) & 32'h01FF_FFFF) >> 2) + 24'(i), golden[b][i]);
      end
    repeat (5) @(posedge clk);
    rst = 0;
    while (slc_busy) @(posedge clk);

    gen_on = 1;
    for (int k = 0; k < 600; k++) begin
      access($urandom_range(2) == 0, $urandom_range(NBLK - 1), $urandom_range(BW - 1));
      repeat ($urandom_range(0, 30)) @(posedge clk);
    end
    gen_on = 0;
    repeat (20000) @(posedge clk);
    // three dirty blocks of one set: the third evicts a dirty frame
    for (int b = 0; b < NBLK; b += int'(SETS)) access(1, b, 3);
    // everything read back through the cache
    for (int b = 0; b < NBLK; b++) begin
      access(0, b, 0);
      access(0, b, BW - 1);
    end

    $display("INFO reads=%0d writes=%0d rmiss=%0d wmiss=%0d own=%0d victim_wb=%0d req_wb=%0d inv_ack=%0d nack=%0d par=%0d",
             n_rd, n_wr, n_rmiss, n_wmiss, n_own, n_victim_wb, n_req_wb, n_inv_ack, n_slc_nack, n_par_wait);
    $display("INFO suspend=%0d resume=%0d mc_nack=%0d inval=%0d blocked=%0d overflow=%0d retries=%0d",
             n_suspend, n_resume, n_nack, n_inval, n_blocked, n_ovf, n_remote_retry);
    check_count("cache read miss", n_rmiss);
    check_count("cache write miss", n_wmiss);
    check_count("ownership request", n_own);
    check_count("victim write-back", n_victim_wb);
    check_count("requested write-back", n_req_wb);
    check_count("inv_ack from the cache", n_inv_ack);
    check_count("nack to the cache", n_slc_nack);
    check_count("access kept in the PAR", n_par_wait);
    check_count("suspend", n_suspend);
    check_count("resume", n_resume);
    check_count("invalidation", n_inval);
    check_count("blocked bank", n_blocked);
    check_count("message limit", n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

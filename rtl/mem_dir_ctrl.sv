// mem_dir_ctrl: memory/directory controller of one board (home node side of
// the directory protocol), with emulated interleaved memory banks.
//
// Messages arrive, one 32-bit word at a time, from the input FIFO filled by
// the network interface; replies and secondary requests leave through the
// output FIFO.  Data blocks, directory entries, suspended headers and
// performance counters all live in one DRAM bank reached through a simple
// word-wide request/acknowledge port (mem_req held with address and data
// until mem_ack; read data is valid with mem_ack).
//
// Main loop (one pass per request):
//   1. If the busy time of some bank has run out, resume the request
//      suspended on the lowest such bank: read its two saved header words,
//      then send a miss reply with the block fetched from DRAM, or only the
//      header (own_reply, wback_req, wback_req_own), or one invalidation per
//      presence bit of the re-read directory entry, or nothing; then free the
//      bank.
//   2. Otherwise, if a coherence header is held in the input buffer and its
//      bank is free, start it: read the directory entry, count the event in
//      the DRAM performance-counter table (read, add one, write back), and
//      let dir_protocol decide.  A nack is sent at once.  An error raises
//      `error` and drops the message.  Otherwise a write-back block is
//      stored, the reply header and address are saved in the bank's suspend
//      slot, the new directory entry is written and the bank timer is loaded
//      with the busy time of the transition's class (A..F).
//   3. Otherwise, if the input FIFO holds a message, latch its two header
//      words.  Test-mode messages (read/write word, read/write block) are
//      served at once, bypassing directory and banks; coherence headers stay
//      in the buffer for step 2, so a header for a busy bank blocks the FIFO.
//
// DRAM word map (default 64 MB): emulated data from 0, directory entries
// from DIR_BASE (one word per block, indexed by block number), suspend slots
// from INTLV_BASE (two words per bank), performance counters from PERF_BASE
// indexed by {requester[2:0], type[4:0], dirty, locked, lock type[1:0],
// presence[7:0]}.  These regions, the address arithmetic, the loop order, the
// suspend/resume sequence and the count-field widths follow the controller
// specification.  The bank of a block (block number modulo NBANKS), the number
// of banks, the header format (see rpm_pkg), the DRAM handshake, the
// run-time busy-time table `susp_time` and the error handling are choices of
// this design.  A message is started only while the output FIFO is below
// its message limit (out_ovf from the interface's counters), so the whole
// message always fits.  The original splits this work over two FPGAs; here it is one
// module.  Event outputs (ev_*) pulse for one clock for monitoring.
module mem_dir_ctrl
  import rpm_pkg::*;
#(
  parameter int unsigned BLOCK_WORDS = 32,
  parameter int unsigned NBANKS      = 4,
  parameter int unsigned CNT_W       = 16,
  parameter int unsigned MEM_AW      = 24,
  parameter logic [23:0] DIR_BASE    = 24'h80_0000,
  parameter logic [23:0] INTLV_BASE  = 24'hA0_0000,
  parameter logic [23:0] PERF_BASE   = 24'hC0_0000
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    tick,        // one pulse per emulated pclock
  input  logic [NODE_W-1:0]       node_id,
  input  logic [5:0][CNT_W-1:0]   susp_time,   // busy time per class A..F, in pclocks
  // input FIFO (from the network interface)
  input  logic                    in_empty,
  input  logic [WORD_W-1:0]       in_data,
  output logic                    in_rd,
  output logic                    in_msg_done,
  // output FIFO (to the network interface)
  input  logic                    out_full,
  input  logic                    out_ovf,     // message limit of the output FIFO reached
  output logic                    out_wr,
  output logic [WORD_W-1:0]       out_data,
  output logic                    out_msg_done,
  // DRAM port
  output logic                    mem_req,
  output logic                    mem_we,
  output logic [MEM_AW-1:0]       mem_addr,
  output logic [WORD_W-1:0]       mem_wdata,
  input  logic                    mem_ack,
  input  logic [WORD_W-1:0]       mem_rdata,
  // status
  output logic                    error,
  output logic [NBANKS-1:0]       bank_busy,
  output logic                    ev_suspend,
  output logic                    ev_resume,
  output logic                    ev_nack,
  output logic                    ev_blocked,
  output logic                    ev_inval
);

  localparam int unsigned WOFF  = $clog2(BLOCK_WORDS);   // word offset bits in a block
  localparam int unsigned BOFF  = WOFF + 2;              // byte offset bits in a block
  localparam int unsigned BNK_W = (NBANKS > 1) ? $clog2(NBANKS) : 1;
  localparam int unsigned BLK_W = 25 - BOFF;             // block number bits, 32 MB emulated

  typedef enum logic [5:0] {
    S_IDLE, S_LATCH0, S_LATCH1,
    S_DIR_RD, S_PERF_RD, S_PERF_WR, S_DISPATCH,
    S_NACK0, S_NACK1, S_DRAIN,
    S_WB, S_SUSP0, S_SUSP1, S_SUSP2,
    S_RS_H0, S_RS_H1, S_RS_DISP, S_RS_SH0, S_RS_SH1,
    S_RS_DIR, S_RS_INV0, S_RS_INV1,
    S_BLK_RD, S_BLK_SEND, S_FREE,
    S_TW_RD, S_TR_H0, S_TR_H1, S_TR_D, S_TW_WR
  } state_e;

  state_e state, state_n;

  // latched input header
  logic [WORD_W-1:0] hdr0_q, hdr1_q;
  logic              latched_q;
  msg_hdr_t          in_hdr;
  assign in_hdr = msg_hdr_t'(hdr0_q);

  // decoded request
  logic [BLK_W-1:0]  blk_num;
  logic [BNK_W-1:0]  req_bank;
  assign blk_num  = hdr1_q[24:BOFF];
  assign req_bank = BNK_W'(blk_num % NBANKS);

  // protocol decision
  dir_entry_t  entry_q;
  dir_action_e p_action;
  dir_entry_t  p_next;
  msg_type_e   p_rtype;
  logic [NODE_W-1:0] p_rdst;
  cnt_class_e  p_class;
  logic        p_store;

  dir_protocol u_proto (
    .mtype      (in_hdr.mtype),
    .req        (in_hdr.src),
    .entry      (entry_q),
    .action     (p_action),
    .next_entry (p_next),
    .reply_type (p_rtype),
    .reply_dst  (p_rdst),
    .cnt_class  (p_class),
    .store_block(p_store)
  );

  dir_entry_t        nxt_q;
  logic [WORD_W-1:0] rhdr_q;     // reply header being built / resumed
  cnt_class_e        class_q;
  logic [WORD_W-1:0] data_q;
  logic [WOFF:0]     wc;         // word counter
  logic [MEM_AW-1:0] blk_base_q; // DRAM word address of block being moved
  logic              blk_resume_q; // block transfer belongs to a resume
  logic              wb_test_q;    // S_WB serves a test-mode block write
  logic [BNK_W-1:0]  rbank_q;
  logic [WORD_W-1:0] raddr_q;    // address word of resumed request
  logic [NNODES-1:0] inv_vec_q;
  logic [NODE_W-1:0] inv_dst;

  // bank timers
  logic [NBANKS-1:0] b_load, b_free, b_timeout;
  logic [CNT_W-1:0]  load_val;
  assign load_val = susp_time[class_q];

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    bank_timer #(.CNT_W(CNT_W)) u_timer (
      .clk      (clk),
      .rst      (rst),
      .tick     (tick),
      .loadcount(b_load[b]),
      .count    (load_val),
      .free     (b_free[b]),
      .busy     (bank_busy[b]),
      .timeout  (b_timeout[b])
    );
  end

  logic [BNK_W-1:0] to_bank;
  always_comb begin
    to_bank = '0;
    for (int b = NBANKS - 1; b >= 0; b--)
      if (b_timeout[b]) to_bank = BNK_W'(b);
  end

  always_comb begin
    inv_dst = '0;
    for (int i = NNODES - 1; i >= 0; i--)
      if (inv_vec_q[i]) inv_dst = NODE_W'(i);
  end

  // address helpers
  logic [MEM_AW-1:0] dir_addr, perf_addr, slot_addr, rslot_addr, rdir_addr, test_addr;
  logic [BLK_W-1:0]  rblk_num;
  assign rblk_num   = raddr_q[24:BOFF];
  assign dir_addr   = DIR_BASE[MEM_AW-1:0] | MEM_AW'(blk_num);
  assign rdir_addr  = DIR_BASE[MEM_AW-1:0] | MEM_AW'(rblk_num);
  assign perf_addr  = PERF_BASE[MEM_AW-1:0] |
                      MEM_AW'({in_hdr.src[2:0], in_hdr.mtype, entry_q.dbit, entry_q.locked,
                               entry_q.ltype, entry_q.pbits[7:0]});
  assign slot_addr  = INTLV_BASE[MEM_AW-1:0] | MEM_AW'({req_bank, 1'b0});
  assign rslot_addr = INTLV_BASE[MEM_AW-1:0] | MEM_AW'({rbank_q, 1'b0});
  assign test_addr  = hdr1_q[MEM_AW+1:2];

  logic last_word;
  assign last_word = (wc == (WOFF+1)'(BLOCK_WORDS - 1));

  // a new outgoing message may start only below the FIFO's message limit
  logic hdr_hold;
  assign hdr_hold = out_full || out_ovf;

  // ------------------------------------------------------------------
  // Next state and outputs
  // ------------------------------------------------------------------
  always_comb begin
    state_n      = state;
    in_rd        = 1'b0;
    in_msg_done  = 1'b0;
    out_wr       = 1'b0;
    out_data     = '0;
    out_msg_done = 1'b0;
    mem_req      = 1'b0;
    mem_we       = 1'b0;
    mem_addr     = '0;
    mem_wdata    = '0;
    b_load       = '0;
    b_free       = '0;
    ev_suspend   = 1'b0;
    ev_resume    = 1'b0;
    ev_nack      = 1'b0;
    ev_blocked   = 1'b0;
    ev_inval     = 1'b0;

    unique case (state)
      S_IDLE: begin
        if (|b_timeout)               state_n = S_RS_H0;
        else if (latched_q) begin
          if (bank_busy[req_bank])    ev_blocked = 1'b1;
          else                        state_n = S_DIR_RD;
        end
        else if (!in_empty)           state_n = S_LATCH0;
      end

      S_LATCH0: if (!in_empty) begin
        in_rd   = 1'b1;
        state_n = S_LATCH1;
      end

      S_LATCH1: if (!in_empty) begin
        in_rd = 1'b1;
        case (in_hdr.mtype)
          RMISS_REQ, WMISS_REQ, OWN_REQ, INV_ACK: begin
            in_msg_done = 1'b1;
            state_n     = S_IDLE;
          end
          WBACK:      state_n = S_IDLE;
          RWORD_REQ:  begin in_msg_done = 1'b1; state_n = S_TW_RD; end
          WWORD_REQ:  state_n = S_TW_WR;
          RBLOCK_REQ: begin in_msg_done = 1'b1; state_n = S_TR_H0; end
          WBLOCK_REQ: state_n = S_WB;
          default:    begin in_msg_done = 1'b1; state_n = S_IDLE; end
        endcase
      end

      S_DIR_RD: begin
        mem_req  = 1'b1;
        mem_addr = dir_addr;
        if (mem_ack) state_n = S_PERF_RD;
      end

      S_PERF_RD: begin
        mem_req  = 1'b1;
        mem_addr = perf_addr;
        if (mem_ack) state_n = S_PERF_WR;
      end

      S_PERF_WR: begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = perf_addr;
        mem_wdata = data_q;
        if (mem_ack) state_n = S_DISPATCH;
      end

      S_DISPATCH: begin
        unique case (p_action)
          ACT_NACK:    state_n = S_NACK0;
          ACT_ERROR:   state_n = (in_hdr.mtype == WBACK) ? S_DRAIN : S_IDLE;
          default:     state_n = p_store ? S_WB : S_SUSP0;
        endcase
      end

      S_NACK0: begin
        out_wr   = !hdr_hold;
        out_data = make_hdr(NACK, node_id, in_hdr.src);
        if (!hdr_hold) state_n = S_NACK1;
      end

      S_NACK1: begin
        out_wr   = !out_full;
        out_data = hdr1_q;
        if (!out_full) begin
          out_msg_done = 1'b1;
          ev_nack      = 1'b1;
          state_n      = S_IDLE;
        end
      end

      S_DRAIN: if (!in_empty) begin
        in_rd = 1'b1;
        if (last_word) begin
          in_msg_done = 1'b1;
          state_n     = S_IDLE;
        end
      end

      // store the words of a block coming from the input FIFO
      S_WB: if (!in_empty) begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = blk_base_q | MEM_AW'(wc);
        mem_wdata = in_data;
        if (mem_ack) begin
          in_rd = 1'b1;
          if (last_word) begin
            in_msg_done = 1'b1;
            state_n     = wb_test_q ? S_IDLE : S_SUSP0;
          end
        end
      end

      S_SUSP0: begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = slot_addr;
        mem_wdata = rhdr_q;
        if (mem_ack) state_n = S_SUSP1;
      end

      S_SUSP1: begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = slot_addr | MEM_AW'(1);
        mem_wdata = hdr1_q;
        if (mem_ack) state_n = S_SUSP2;
      end

      S_SUSP2: begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = dir_addr;
        mem_wdata = WORD_W'(nxt_q);
        if (mem_ack) begin
          b_load[req_bank] = 1'b1;
          ev_suspend       = 1'b1;
          state_n          = S_IDLE;
        end
      end

      S_RS_H0: begin
        mem_req  = 1'b1;
        mem_addr = rslot_addr;
        if (mem_ack) state_n = S_RS_H1;
      end

      S_RS_H1: begin
        mem_req  = 1'b1;
        mem_addr = rslot_addr | MEM_AW'(1);
        if (mem_ack) state_n = S_RS_DISP;
      end

      S_RS_DISP: begin
        case (msg_type_e'(rhdr_q[31:27]))
          MISS_REPLY, MISS_REPLY_OWN, OWN_REPLY,
          WBACK_REQ, WBACK_REQ_OWN:            state_n = S_RS_SH0;
          INVALIDATION:                        state_n = S_RS_DIR;
          default:                             state_n = S_FREE;
        endcase
      end

      S_RS_SH0: begin
        out_wr   = !hdr_hold;
        out_data = rhdr_q;
        if (!hdr_hold) state_n = S_RS_SH1;
      end

      S_RS_SH1: begin
        out_wr   = !out_full;
        out_data = raddr_q;
        if (!out_full) begin
          if (msg_type_e'(rhdr_q[31:27]) == MISS_REPLY ||
              msg_type_e'(rhdr_q[31:27]) == MISS_REPLY_OWN)
            state_n = S_BLK_RD;
          else begin
            out_msg_done = 1'b1;
            state_n      = S_FREE;
          end
        end
      end

      S_RS_DIR: begin
        mem_req  = 1'b1;
        mem_addr = rdir_addr;
        if (mem_ack) state_n = S_RS_INV0;
      end

      S_RS_INV0: begin
        if (inv_vec_q == '0) state_n = S_FREE;
        else begin
          out_wr   = !hdr_hold;
          out_data = make_hdr(INVALIDATION, node_id, inv_dst);
          if (!hdr_hold) state_n = S_RS_INV1;
        end
      end

      S_RS_INV1: begin
        out_wr   = !out_full;
        out_data = raddr_q;
        if (!out_full) begin
          out_msg_done = 1'b1;
          ev_inval     = 1'b1;
          state_n      = S_RS_INV0;
        end
      end

      // read one block word from DRAM, then send it
      S_BLK_RD: begin
        mem_req  = 1'b1;
        mem_addr = blk_base_q | MEM_AW'(wc);
        if (mem_ack) state_n = S_BLK_SEND;
      end

      S_BLK_SEND: begin
        out_wr   = !out_full;
        out_data = data_q;
        if (!out_full) begin
          if (last_word) begin
            out_msg_done = 1'b1;
            state_n      = blk_resume_q ? S_FREE : S_IDLE;
          end else
            state_n = S_BLK_RD;
        end
      end

      S_FREE: begin
        b_free[rbank_q] = 1'b1;
        ev_resume       = 1'b1;
        state_n         = S_IDLE;
      end

      // test mode: read word
      S_TW_RD: begin
        mem_req  = 1'b1;
        mem_addr = test_addr;
        if (mem_ack) state_n = S_TR_H0;
      end

      // test mode reply header (read word or read block)
      S_TR_H0: begin
        out_wr   = !hdr_hold;
        out_data = make_hdr((in_hdr.mtype == RWORD_REQ) ? RWORD_REPLY : RBLOCK_REPLY,
                            node_id, in_hdr.src);
        if (!hdr_hold) state_n = S_TR_H1;
      end

      S_TR_H1: begin
        out_wr   = !out_full;
        out_data = hdr1_q;
        if (!out_full) state_n = (in_hdr.mtype == RWORD_REQ) ? S_TR_D : S_BLK_RD;
      end

      S_TR_D: begin
        out_wr   = !out_full;
        out_data = data_q;
        if (!out_full) begin
          out_msg_done = 1'b1;
          state_n      = S_IDLE;
        end
      end

      // test mode: write word
      S_TW_WR: if (!in_empty) begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = test_addr;
        mem_wdata = in_data;
        if (mem_ack) begin
          in_rd       = 1'b1;
          in_msg_done = 1'b1;
          state_n     = S_IDLE;
        end
      end

      default: state_n = S_IDLE;
    endcase
  end

  // ------------------------------------------------------------------
  // Registers
  // ------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      latched_q    <= 1'b0;
      hdr0_q       <= '0;
      hdr1_q       <= '0;
      entry_q      <= '0;
      nxt_q        <= '0;
      rhdr_q       <= '0;
      class_q      <= CNT_A;
      data_q       <= '0;
      wc           <= '0;
      blk_base_q   <= '0;
      blk_resume_q <= 1'b0;
      wb_test_q    <= 1'b0;
      rbank_q      <= '0;
      raddr_q      <= '0;
      inv_vec_q    <= '0;
      error        <= 1'b0;
    end else begin
      state <= state_n;
      unique case (state)
        S_IDLE: if (|b_timeout) rbank_q <= to_bank;
        S_LATCH0: if (!in_empty) hdr0_q <= in_data;
        S_LATCH1: if (!in_empty) begin
          hdr1_q <= in_data;
          wc     <= '0;
          if (is_coherence(in_hdr.mtype)) latched_q <= 1'b1;
          else if (in_hdr.mtype > WBLOCK_REQ) error <= 1'b1;
          blk_resume_q <= 1'b0;
          wb_test_q    <= 1'b1;
          blk_base_q   <= {in_data[MEM_AW+1:BOFF], {WOFF{1'b0}}};
        end
        S_DIR_RD:  if (mem_ack) entry_q <= dir_entry_t'(mem_rdata[DIR_W-1:0]);
        S_PERF_RD: if (mem_ack) data_q <= mem_rdata + 1'b1;
        S_DISPATCH: begin
          latched_q  <= 1'b0;
          nxt_q      <= p_next;
          rhdr_q     <= make_hdr(p_rtype, node_id, p_rdst);
          class_q    <= p_class;
          wc         <= '0;
          wb_test_q  <= 1'b0;
          blk_base_q <= MEM_AW'({blk_num, {WOFF{1'b0}}});
          if (p_action == ACT_ERROR) error <= 1'b1;
        end
        S_DRAIN: if (!in_empty) wc <= wc + 1'b1;
        S_WB: if (!in_empty && mem_ack) wc <= wc + 1'b1;
        S_RS_H0: if (mem_ack) rhdr_q <= mem_rdata;
        S_RS_H1: if (mem_ack) begin
          raddr_q      <= mem_rdata;
          wc           <= '0;
          blk_resume_q <= 1'b1;
          blk_base_q   <= MEM_AW'({mem_rdata[24:BOFF], {WOFF{1'b0}}});
        end
        S_RS_DIR: if (mem_ack) inv_vec_q <= mem_rdata[NNODES-1:0];
        S_RS_INV1: if (!out_full) inv_vec_q[inv_dst] <= 1'b0;
        S_BLK_RD: if (mem_ack) data_q <= mem_rdata;
        S_BLK_SEND: if (!out_full) wc <= wc + 1'b1;
        S_TW_RD: if (mem_ack) data_q <= mem_rdata;
        default: ;
      endcase
    end
  end

  // A request is only started on a free bank, and only one is suspended per bank.
  assert property (@(posedge clk) disable iff (rst)
                   (state == S_SUSP2 && mem_ack) |-> !bank_busy[req_bank]);
  // Words are only popped from a non-empty FIFO and pushed into a non-full one.
  assert property (@(posedge clk) disable iff (rst) in_rd |-> !in_empty);
  assert property (@(posedge clk) disable iff (rst) out_wr |-> !out_full);

endmodule

// slcc_ctrl: control unit of the second-level cache (SLC) of one board.
//
// The SLC is a write-back, set-associative cache that stays coherent with
// the full-map directory of every block's home memory controller.  It takes
// two kinds of work:
//   * an access from the first-level cache controller: a read miss or a write
//     (req held high with req_we, req_addr, req_wdata until `done`);
//   * a message from the network interface: a reply from a home node
//     (miss_reply, miss_reply_own, own_reply, nack) or a secondary request
//     (invalidation, wback_req, wback_req_own).
// Every task begins with a directory lookup.  The blockframes of the
// selected set are streamed, one per clock, through victim_select, which
// returns the matching frame or the best victim.  Then the controller acts:
//   * read hit (RO/RW), or write hit in RW: the word is read or written in the
//     data SRAM and `done` pulses;
//   * write hit in RO: the frame becomes PEND_RW_VAL and own_req goes to the
//     home node;
//   * miss with a victim: a victim in RW is written back first (wback with
//     its block).  The frame takes the new tag and becomes PEND_RO (read, an
//     rmiss_req is sent) or PEND_RW_INV (write, a wmiss_req is sent);
//   * hit on a pending frame, or miss with every frame pending: nothing is
//     sent.
// Whenever an access cannot finish at once it is kept in the pending access
// register (PAR) and retried after each message that arrives, until it
// completes.  Replies fill the frame (RO for miss_reply, RW for
// miss_reply_own) or grant write permission (own_reply: PEND_RW_VAL -> RW).
// An invalidation takes RO to INV and PEND_RW_VAL to PEND_RW_INV, and is
// always answered with an inv_ack.  A write-back request for a frame in RW
// sends the block back and leaves the frame in RO (wback_req) or INV
// (wback_req_own).  A nack repeats the request that the frame's pending
// state stands for: rmiss_req for PEND_RO, own_req for PEND_RW_VAL and
// wmiss_req for PEND_RW_INV.
//
// Interface and timing.
//   * Messages leave through the FIFO towards the interface: out_wr with
//     out_data, stalled while out_full, and out_inc with the last word.
//   * They arrive through the FIFO from the interface: in_rd pops the word
//     on in_data when !in_empty, and in_dec marks the end of a message.
//   * The block data live in an external SRAM with an asynchronous read:
//     slm_addr = {frame, word}, slm_we, slm_wdata, slm_rdata.
//   * The tag/state directory of the cache is an array inside this module.
//     It is cleared to INV by a sweep after reset; `busy` is high meanwhile.
//   * The home node of an address is byte address bits [28:25], matching
//     the 32 MB of emulated data of each memory controller.
//
// The blockframe states, the lookup with tag match and victim choice, the
// PAR and its retry, and the reaction to each message follow the cache
// controller's flowcharts.  The one-access-at-a-time interface, the
// internal directory array, the home-node bits and the retry after every
// message are this design's choices.  Prefetches, read-modify-write,
// double-word writes, test-mode accesses and the performance counters of
// the flowcharts are not built.
module slcc_ctrl
  import rpm_pkg::*;
#(
  parameter int unsigned BLOCK_WORDS = 32,
  parameter int unsigned NSETS       = 16384,
  parameter int unsigned ASSOC       = 2
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [NODE_W-1:0]       node_id,
  // access from the first-level cache controller
  input  logic                    req,
  input  logic                    req_we,
  input  logic [31:0]             req_addr,
  input  logic [WORD_W-1:0]       req_wdata,
  output logic                    done,
  output logic [WORD_W-1:0]       rdata,
  output logic                    busy,
  // FIFO towards the interface
  output logic                    out_wr,
  output logic [WORD_W-1:0]       out_data,
  input  logic                    out_full,
  output logic                    out_inc,
  // FIFO from the interface
  input  logic                    in_empty,
  input  logic [WORD_W-1:0]       in_data,
  output logic                    in_rd,
  output logic                    in_dec,
  // data SRAM
  output logic [$clog2(NSETS*ASSOC*BLOCK_WORDS)-1:0] slm_addr,
  output logic                    slm_we,
  output logic [WORD_W-1:0]       slm_wdata,
  input  logic [WORD_W-1:0]       slm_rdata
);

  localparam int unsigned WOFF  = $clog2(BLOCK_WORDS);
  localparam int unsigned BOFF  = WOFF + 2;
  localparam int unsigned SET_W = (NSETS > 1) ? $clog2(NSETS) : 1;
  localparam int unsigned TAG_W = 32 - BOFF - SET_W;
  localparam int unsigned WAY_W = $clog2(ASSOC + 1);
  localparam int unsigned FR_W  = $clog2(NSETS * ASSOC);

  // tag/state directory
  logic [TAG_W-1:0] tag_mem [NSETS*ASSOC];
  slc_state_e       st_mem  [NSETS*ASSOC];

  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_MHDR, S_MADR, S_SCAN, S_WAIT, S_ACT, S_FILL, S_DRAIN,
    S_ACC, S_SEND_H, S_SEND_A, S_SEND_D
  } state_e;
  state_e state;

  // current task
  logic              is_msg;           // task is a message, not an access
  msg_type_e         m_type;           // type and sender of the message
  logic [NODE_W-1:0] m_src;
  logic [31:0]       taddr;            // address of the task
  logic              twe;
  logic [WORD_W-1:0] twdata;
  // pending access register
  logic              par_valid, par_retry, par_we;
  logic [31:0]       par_addr;
  logic [WORD_W-1:0] par_wdata;

  logic [SET_W-1:0]  tset;
  logic [TAG_W-1:0]  ttag;
  logic [NODE_W-1:0] thome;
  assign tset  = taddr[BOFF +: SET_W];
  assign ttag  = taddr[31 -: TAG_W];
  assign thome = taddr[28:25];

  // lookup through victim_select
  logic             vs_start, vs_valid, vs_last, vs_done, vs_hit, vs_vavail;
  logic [WAY_W-1:0] scan_way, vs_hit_way, vs_vway;
  slc_state_e       vs_hit_state, vs_vstate;
  logic [FR_W-1:0]  scan_fr;
  assign scan_fr  = FR_W'(tset) * FR_W'(ASSOC) + FR_W'(scan_way);
  assign vs_valid = (state == S_SCAN);
  assign vs_last  = (scan_way == WAY_W'(ASSOC - 1));

  victim_select #(.ASSOC(ASSOC), .TAG_W(TAG_W)) u_vs (
    .clk         (clk),
    .rst         (rst),
    .start       (vs_start),
    .tag         (ttag),
    .entry_valid (vs_valid),
    .entry_tag   (tag_mem[scan_fr]),
    .entry_state (st_mem[scan_fr]),
    .entry_way   (scan_way),
    .entry_last  (vs_last),
    .done        (vs_done),
    .hit         (vs_hit),
    .hit_way     (vs_hit_way),
    .hit_state   (vs_hit_state),
    .victim_avail(vs_vavail),
    .victim_way  (vs_vway),
    .victim_state(vs_vstate)
  );

  // frame the task works on, and word counter
  logic [FR_W-1:0] fr;
  logic [WOFF:0]   wc;
  logic [FR_W-1:0] init_fr;

  // up to two messages to send: the first may be a write-back
  logic              snd_blk, snd2_valid;
  msg_type_e         snd_type, snd2_type;
  logic [NODE_W-1:0] snd_dst, snd2_dst;
  logic [31:0]       snd_addr, snd2_addr;

  logic last_word;
  assign last_word = (wc == (WOFF+1)'(BLOCK_WORDS - 1));

  // combinational outputs
  always_comb begin
    out_wr    = 1'b0;
    out_data  = '0;
    out_inc   = 1'b0;
    in_rd     = 1'b0;
    in_dec    = 1'b0;
    slm_we    = 1'b0;
    slm_addr  = {fr, taddr[WOFF+1:2]};
    slm_wdata = twdata;
    vs_start  = 1'b0;
    busy      = (state == S_INIT);
    unique case (state)
      S_MHDR:  in_rd = !in_empty;
      S_MADR: begin
        in_rd  = !in_empty;
        in_dec = !in_empty && msg_len(m_type, BLOCK_WORDS) == 2;
      end
      S_FILL, S_DRAIN: begin
        in_rd     = !in_empty;
        in_dec    = !in_empty && last_word;
        slm_we    = (state == S_FILL) && !in_empty;
        slm_addr  = {fr, wc[WOFF-1:0]};
        slm_wdata = in_data;
      end
      S_ACC:   slm_we = twe;
      S_SEND_H: begin
        out_wr   = !out_full;
        out_data = make_hdr(snd_type, node_id, snd_dst);
      end
      S_SEND_A: begin
        out_wr   = !out_full;
        out_data = snd_addr;
        out_inc  = !out_full && !snd_blk;
      end
      S_SEND_D: begin
        slm_addr = {fr, wc[WOFF-1:0]};
        out_wr   = !out_full;
        out_data = slm_rdata;
        out_inc  = !out_full && last_word;
      end
      default: ;
    endcase
    if (state == S_IDLE) vs_start = 1'b1;
  end

  // the frame's address, for a write-back of a victim
  function automatic logic [31:0] frame_addr(logic [TAG_W-1:0] t, logic [SET_W-1:0] s);
    logic [31:0] a;
    a = '0;
    a[31 -: TAG_W]  = t;
    a[BOFF +: SET_W] = s;
    return a;
  endfunction

  logic [31:0]       victim_addr;
  logic [NODE_W-1:0] victim_home;
  assign victim_addr = frame_addr(tag_mem[FR_W'(tset) * FR_W'(ASSOC) + FR_W'(vs_vway)], tset);
  assign victim_home = victim_addr[28:25];

  logic no_in_word;
  assign no_in_word = in_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_INIT;
      init_fr    <= '0;
      par_valid  <= 1'b0;
      par_retry  <= 1'b0;
      par_we     <= 1'b0;
      par_addr   <= '0;
      par_wdata  <= '0;
      is_msg     <= 1'b0;
      m_type     <= NULL_MSG;
      m_src      <= '0;
      taddr      <= '0;
      twe        <= 1'b0;
      twdata     <= '0;
      scan_way   <= '0;
      fr         <= '0;
      wc         <= '0;
      snd_blk    <= 1'b0;
      snd2_valid <= 1'b0;
      snd_type   <= NULL_MSG;
      snd2_type  <= NULL_MSG;
      snd_dst    <= '0;
      snd2_dst   <= '0;
      snd_addr   <= '0;
      snd2_addr  <= '0;
      done       <= 1'b0;
      rdata      <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_INIT: begin
          st_mem[init_fr]  <= SLC_INV;
          tag_mem[init_fr] <= '0;
          init_fr          <= init_fr + 1'b1;
          if (init_fr == FR_W'(NSETS * ASSOC - 1)) state <= S_IDLE;
        end

        // messages first, then the pending access, then a new access
        S_IDLE: begin
          scan_way <= '0;
          if (!in_empty) begin
            is_msg <= 1'b1;
            state  <= S_MHDR;
          end else if (par_valid && par_retry) begin
            is_msg    <= 1'b0;
            par_retry <= 1'b0;
            taddr     <= par_addr;
            twe       <= par_we;
            twdata    <= par_wdata;
            state     <= S_SCAN;
          end else if (req && !par_valid && !done) begin
            is_msg    <= 1'b0;
            taddr     <= req_addr;
            twe       <= req_we;
            twdata    <= req_wdata;
            par_addr  <= req_addr;
            par_we    <= req_we;
            par_wdata <= req_wdata;
            state     <= S_SCAN;
          end
        end

        S_MHDR: if (!no_in_word) begin
          m_type <= msg_type_e'(in_data[31:27]);
          m_src  <= in_data[26:23];
          state <= S_MADR;
        end

        S_MADR: if (!no_in_word) begin
          taddr <= in_data;
          state <= S_SCAN;
        end

        S_SCAN: begin
          scan_way <= scan_way + 1'b1;
          if (vs_done)      state <= S_ACT;    // early match
          else if (vs_last) state <= S_WAIT;
        end

        S_WAIT: if (vs_done) state <= S_ACT;

        S_ACT: begin
          fr         <= FR_W'(tset) * FR_W'(ASSOC) + FR_W'(vs_hit ? vs_hit_way : vs_vway);
          wc         <= '0;
          snd_blk    <= 1'b0;
          snd2_valid <= 1'b0;
          snd_addr   <= {taddr[31:BOFF], {BOFF{1'b0}}};   // messages carry the block address
          snd_dst    <= m_src;
          state      <= S_IDLE;
          if (is_msg) begin
            par_retry <= par_valid;
            unique case (m_type)
              MISS_REPLY, MISS_REPLY_OWN: begin
                if (vs_hit && (vs_hit_state == SLC_PEND_RO || vs_hit_state == SLC_PEND_RW_INV)) begin
                  st_mem[FR_W'(tset) * FR_W'(ASSOC) + FR_W'(vs_hit_way)] <=
                    (m_type == MISS_REPLY) ? SLC_RO : SLC_RW;
                  state <= S_FILL;
                end else begin
                  state <= S_DRAIN;
                end
              end
              OWN_REPLY: begin
                if (vs_hit && vs_hit_state == SLC_PEND_RW_VAL)
                  st_mem[FR_W'(tset) * FR_W'(ASSOC) + FR_W'(vs_hit_way)] <= SLC_RW;
              end
              INVALIDATION: begin
                if (vs_hit && vs_hit_state == SLC_RO)
                  st_mem[FR_W'(tset) * FR_W'(ASSOC) + FR_W'(vs_hit_way)] <= SLC_INV;
                if (vs_hit && vs_hit_state == SLC_PEND_RW_VAL)
                  st_mem[FR_W'(tset) * FR_W'(ASSOC) + FR_W'(vs_hit_way)] <= SLC_PEND_RW_INV;
                snd_type <= INV_ACK;
                state    <= S_SEND_H;
              end
              WBACK_REQ, WBACK_REQ_OWN: begin
                if (vs_hit && vs_hit_state == SLC_RW) begin
                  st_mem[FR_W'(tset) * FR_W'(ASSOC) + FR_W'(vs_hit_way)] <=
                    (m_type == WBACK_REQ) ? SLC_RO : SLC_INV;
                  snd_type <= WBACK;
                  snd_blk  <= 1'b1;
                  state    <= S_SEND_H;
                end
              end
              NACK: begin
                if (vs_hit && (vs_hit_state == SLC_PEND_RO || vs_hit_state == SLC_PEND_RW_VAL ||
                               vs_hit_state == SLC_PEND_RW_INV)) begin
                  snd_type <= (vs_hit_state == SLC_PEND_RO)     ? RMISS_REQ :
                              (vs_hit_state == SLC_PEND_RW_VAL) ? OWN_REQ : WMISS_REQ;
                  state    <= S_SEND_H;
                end
              end
              default: begin
                // other messages are not for this unit: their data are dropped
                if (msg_len(m_type, BLOCK_WORDS) > 2) begin
                  wc    <= (WOFF+1)'(BLOCK_WORDS + 2 - msg_len(m_type, BLOCK_WORDS));
                  state <= S_DRAIN;
                end
              end
            endcase
          end else begin
            snd_dst <= thome;
            if (vs_hit && (vs_hit_state == SLC_RW || (vs_hit_state == SLC_RO && !twe))) begin
              state <= S_ACC;
            end else if (vs_hit && vs_hit_state == SLC_RO) begin
              st_mem[FR_W'(tset) * FR_W'(ASSOC) + FR_W'(vs_hit_way)] <= SLC_PEND_RW_VAL;
              snd_type  <= OWN_REQ;
              par_valid <= 1'b1;
              state     <= S_SEND_H;
            end else if (!vs_hit && vs_vavail) begin
              st_mem[FR_W'(tset) * FR_W'(ASSOC) + FR_W'(vs_vway)]  <= twe ? SLC_PEND_RW_INV : SLC_PEND_RO;
              tag_mem[FR_W'(tset) * FR_W'(ASSOC) + FR_W'(vs_vway)] <= ttag;
              par_valid <= 1'b1;
              if (vs_vstate == SLC_RW) begin
                snd_type   <= WBACK;
                snd_blk    <= 1'b1;
                snd_addr   <= victim_addr;
                snd_dst    <= victim_home;
                snd2_valid <= 1'b1;
                snd2_type  <= twe ? WMISS_REQ : RMISS_REQ;
                snd2_dst   <= thome;
                snd2_addr  <= {taddr[31:BOFF], {BOFF{1'b0}}};
              end else begin
                snd_type <= twe ? WMISS_REQ : RMISS_REQ;
              end
              state <= S_SEND_H;
            end else begin
              // a pending frame: wait in the PAR
              par_valid <= 1'b1;
            end
          end
        end

        S_ACC: begin
          rdata     <= slm_rdata;
          done      <= 1'b1;
          par_valid <= 1'b0;
          state     <= S_IDLE;
        end

        S_FILL, S_DRAIN: if (!no_in_word) begin
          wc <= wc + 1'b1;
          if (last_word) state <= S_IDLE;
        end

        S_SEND_H: if (!out_full) state <= S_SEND_A;

        S_SEND_A: if (!out_full) begin
          wc <= '0;
          if (snd_blk) state <= S_SEND_D;
          else if (snd2_valid) begin
            snd2_valid <= 1'b0;
            snd_type   <= snd2_type;
            snd_dst    <= snd2_dst;
            snd_addr   <= snd2_addr;
            state      <= S_SEND_H;
          end else state <= S_IDLE;
        end

        S_SEND_D: if (!out_full) begin
          wc <= wc + 1'b1;
          if (last_word) begin
            snd_blk <= 1'b0;
            if (snd2_valid) begin
              snd2_valid <= 1'b0;
              snd_type   <= snd2_type;
              snd_dst    <= snd2_dst;
              snd_addr   <= snd2_addr;
              state      <= S_SEND_H;
            end else state <= S_IDLE;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

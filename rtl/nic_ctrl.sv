// nic_ctrl: routing controller of the network interface.
//
// A small state machine plus a header decoder.  While the data path is free
// it polls the three "message ready" flags with fixed priority: network chip
// (port 0) first, then the second-level cache controller (port 1), then the
// memory controller (port 2).  It looks at the header word at the head of the
// chosen FIFO (without popping it) and decodes the destination and the
// message length:
//   * destination node != board_id       -> port 0 (to the network)
//   * local, type bit 4 clear (request)  -> port 2 (memory controller)
//   * local, type bit 4 set (reply etc.) -> port 1 (cache controller)
// If the destination's outgoing FIFO is at its message limit, the message is
// left at the head of its FIFO and that source is skipped until another
// message has been started (or no other source is ready), so one full
// destination cannot stall traffic between the others; otherwise it copies
// the whole message, one word per clock whenever the source
// FIFO has a word and the destination FIFO has room.  At the end it pulses
// nic_dec for the source and nic_inc for the destination message counters.
// A message whose destination is the port it came from (for instance from
// the memory controller to itself) is an error: it is read and discarded and
// `error` pulses (the interrupt to the processor).
//
// Priorities, header decoding, copying and the error check follow the
// interface description.  The header layout (rpm_pkg), the rule that
// routes by type bit and the skipping of a source whose destination is full
// are this design's choices (without the skip, the interface and the memory
// controller can deadlock: each waits for the other's FIFO to drain).
module nic_ctrl
  import rpm_pkg::*;
#(
  parameter int unsigned BLOCK_WORDS = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [NODE_W-1:0]        board_id,
  input  logic [2:0]               msg_ready,
  input  logic [2:0]               out_overflow,
  input  logic [2:0]               in_empty,
  input  logic [2:0]               out_full,
  input  logic [2:0][WORD_W-1:0]   in_data,
  output logic [1:0]               src,
  output logic [1:0]               dst,
  output logic                     xfer,
  output logic [2:0]               drop_rd,
  output logic [2:0]               nic_dec,
  output logic [2:0]               nic_inc,
  output logic                     error,
  output logic                     busy
);

  typedef enum logic [1:0] {N_IDLE, N_HDR, N_COPY, N_DROP} nstate_e;

  nstate_e           st;
  logic [1:0]        src_q, dst_q;
  logic [7:0]        left_q;        // words still to move
  msg_hdr_t          head;
  logic [1:0]        dec_dst;
  logic [7:0]        dec_len;

  assign head = msg_hdr_t'(in_data[src_q]);

  always_comb begin
    if (head.dst != board_id)  dec_dst = 2'd0;
    else if (!head.mtype[4])   dec_dst = 2'd2;
    else                       dec_dst = 2'd1;
    dec_len = 8'(msg_len(head.mtype, BLOCK_WORDS));
  end

  // sources eligible this round: ready and not just turned away
  logic [2:0] skip_q, cand;
  assign cand = msg_ready & ~skip_q;

  logic can_move;
  assign can_move = !in_empty[src_q] && !out_full[dst_q];

  assign src     = src_q;
  assign dst     = dst_q;
  assign xfer    = (st == N_COPY) && can_move;
  assign busy    = (st != N_IDLE);

  always_comb begin
    drop_rd = '0;
    nic_dec = '0;
    nic_inc = '0;
    error   = 1'b0;
    if (st == N_DROP && !in_empty[src_q]) begin
      drop_rd[src_q] = 1'b1;
      if (left_q == 8'd1) begin
        nic_dec[src_q] = 1'b1;
        error          = 1'b1;
      end
    end
    if (xfer && left_q == 8'd1) begin
      nic_dec[src_q] = 1'b1;
      nic_inc[dst_q] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= N_IDLE;
      src_q  <= '0;
      dst_q  <= '0;
      left_q <= '0;
      skip_q <= '0;
    end else begin
      unique case (st)
        N_IDLE: begin
          if (cand[0])      begin src_q <= 2'd0; st <= N_HDR; end
          else if (cand[1]) begin src_q <= 2'd1; st <= N_HDR; end
          else if (cand[2]) begin src_q <= 2'd2; st <= N_HDR; end
          else              skip_q <= '0;
        end
        N_HDR: if (!in_empty[src_q]) begin
          dst_q  <= dec_dst;
          left_q <= dec_len;
          if (dec_dst == src_q) st <= N_DROP;
          else if (!out_overflow[dec_dst]) begin
            st     <= N_COPY;
            skip_q <= '0;
          end else begin
            // destination about to overflow: leave this message at the head
            // of its FIFO and give the other sources a turn
            st            <= N_IDLE;
            skip_q[src_q] <= 1'b1;
          end
        end
        N_COPY: if (can_move) begin
          left_q <= left_q - 8'd1;
          if (left_q == 8'd1) st <= N_IDLE;
        end
        N_DROP: if (!in_empty[src_q]) begin
          left_q <= left_q - 8'd1;
          if (left_q == 8'd1) st <= N_IDLE;
        end
        default: st <= N_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (rst) xfer |-> src_q != dst_q);

endmodule

// nic: network interface chip of one board.
//
// Connects three bidirectional FIFO pairs: port 0 to the network chip
// (LIFE, Futurebus+ side), port 1 to the second-level cache controller, port
// 2 to the memory controller.  It is made of three identical FIFO controls
// (nic_fifo_ctrl, whole-message counters), the routing controller (nic_ctrl)
// and the word switch (nic_datapath).  Every message that any unit writes
// into its NIC-bound FIFO is copied, whole and in order, into the unit-bound
// FIFO of the unit its header names.  Messages are copied one at a time,
// highest-priority ready port first (network, then cache, then memory).
//
// Interface, per port p: the read side of the incoming FIFO (in_empty,
// in_data, in_rd), the write side of the outgoing FIFO (out_full, out_wr,
// out_data), and the message handshake with the unit: unit_inc (the unit
// finished writing a message), unit_dec (the unit finished reading one),
// msg_avail (a whole message waits for the unit) and in_overflow (the unit
// must not start another message).  `error` pulses when a message is
// addressed back to its own port.  Organisation and priorities follow the
// interface description; the port signalling is this design's.
module nic
  import rpm_pkg::*;
#(
  parameter int unsigned BLOCK_WORDS = 32,
  parameter int unsigned MAX_MSGS    = 120
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [NODE_W-1:0]        board_id,
  input  logic [2:0]               in_empty,
  input  logic [2:0][WORD_W-1:0]   in_data,
  output logic [2:0]               in_rd,
  input  logic [2:0]               out_full,
  output logic [2:0]               out_wr,
  output logic [2:0][WORD_W-1:0]   out_data,
  input  logic [2:0]               unit_inc,
  input  logic [2:0]               unit_dec,
  output logic [2:0]               msg_avail,
  output logic [2:0]               in_overflow,
  output logic                     error,
  output logic                     busy
);

  logic [2:0] msg_ready, out_overflow, nic_dec, nic_inc, drop_rd, dp_rd;
  logic [1:0] src, dst;
  logic       xfer;

  for (genvar p = 0; p < 3; p++) begin : g_fc
    nic_fifo_ctrl #(.MAX_MSGS(MAX_MSGS)) u_fc (
      .clk         (clk),
      .rst         (rst),
      .unit_inc    (unit_inc[p]),
      .nic_dec     (nic_dec[p]),
      .nic_inc     (nic_inc[p]),
      .unit_dec    (unit_dec[p]),
      .msg_ready   (msg_ready[p]),
      .out_avail   (msg_avail[p]),
      .in_overflow (in_overflow[p]),
      .out_overflow(out_overflow[p])
    );
  end

  nic_ctrl #(.BLOCK_WORDS(BLOCK_WORDS)) u_ctrl (
    .clk         (clk),
    .rst         (rst),
    .board_id    (board_id),
    .msg_ready   (msg_ready),
    .out_overflow(out_overflow),
    .in_empty    (in_empty),
    .out_full    (out_full),
    .in_data     (in_data),
    .src         (src),
    .dst         (dst),
    .xfer        (xfer),
    .drop_rd     (drop_rd),
    .nic_dec     (nic_dec),
    .nic_inc     (nic_inc),
    .error       (error),
    .busy        (busy)
  );

  nic_datapath #(.W(WORD_W)) u_dp (
    .in_data (in_data),
    .src     (src),
    .dst     (dst),
    .xfer    (xfer),
    .in_rd   (dp_rd),
    .out_wr  (out_wr),
    .out_data(out_data)
  );

  assign in_rd = dp_rd | drop_rd;

endmodule

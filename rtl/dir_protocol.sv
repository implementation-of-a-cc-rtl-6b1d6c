// dir_protocol: next-state logic of the full-map write-invalidate directory
// protocol run by the memory/directory controller.
//
// Purely combinational.  Given an incoming coherence message (rmiss_req,
// wmiss_req, own_req, inv_ack, wback), the node that sent it and the current
// directory entry of the block, it returns what the controller must do:
//   * ACT_SUSPEND : write next_entry back, suspend the request for the busy
//                   time of class cnt_class, then send reply_type to
//                   reply_dst (NULL_MSG: nothing is sent; INVALIDATION: one
//                   invalidation to every node whose presence bit is set in
//                   next_entry),
//   * ACT_NACK    : send a nack to the requester now, entry unchanged,
//   * ACT_ERROR   : the message is illegal in this state; it is dropped.
// store_block tells that the message carries a block that must be written to
// memory (a legal wback).
//
// The transitions, conditions, actions and outputs are the state transition
// tables of the protocol; the busy-time class of every transition is the
// count-value table (A..F).  Where the dirty node is needed it is decoded from
// the presence vector of a dirty or Dty_* entry, which holds exactly one bit.
// An inv_ack is the last one when clearing the sender's presence bit leaves
// the vector empty.  Node ids at or above NNODES have no presence bit and are
// treated as not present (a choice of this design).
module dir_protocol
  import rpm_pkg::*;
(
  input  msg_type_e          mtype,
  input  logic [NODE_W-1:0]  req,
  input  dir_entry_t         entry,
  output dir_action_e        action,
  output dir_entry_t         next_entry,
  output msg_type_e          reply_type,
  output logic [NODE_W-1:0]  reply_dst,
  output cnt_class_e         cnt_class,
  output logic               store_block
);

  logic [NNODES-1:0] req_bit, rid_bit, dirty_bit, left_after_ack;
  logic [NODE_W-1:0] dirty_id;
  logic              other_shared, pbit_req, is_uncached, is_dirty, is_shared;

  always_comb begin
    req_bit = '0;
    rid_bit = '0;
    if (int'(req) < NNODES)          req_bit[req] = 1'b1;
    if (int'(entry.req_id) < NNODES) rid_bit[entry.req_id] = 1'b1;
    dirty_id = '0;
    for (int i = NNODES - 1; i >= 0; i--)
      if (entry.pbits[i]) dirty_id = NODE_W'(i);
    dirty_bit      = entry.pbits & ~(entry.pbits - NNODES'(1));  // lowest set bit
    other_shared   = |(entry.pbits & ~req_bit);
    pbit_req       = |(entry.pbits & req_bit);
    left_after_ack = entry.pbits & ~req_bit;
    is_uncached    = !entry.locked && (entry.pbits == '0);
    is_dirty       = !entry.locked && !is_uncached && entry.dbit;
    is_shared      = !entry.locked && !is_uncached && !entry.dbit;
  end

  always_comb begin
    action      = ACT_ERROR;
    next_entry  = entry;
    reply_type  = NULL_MSG;
    reply_dst   = req;
    cnt_class   = CNT_A;
    store_block = 1'b0;

    unique case (mtype)
      RMISS_REQ, WMISS_REQ: begin
        if (entry.locked) begin
          if (entry.ltype == LT_SH_DTY_OWN || entry.ltype == LT_SH_DTY_MISS)
            action = ACT_NACK;
          else if (req != dirty_id)
            action = ACT_NACK;
          else
            action = ACT_ERROR;
        end else if (is_dirty) begin
          if (req == dirty_id) action = ACT_ERROR;
          else begin
            action            = ACT_SUSPEND;
            next_entry.locked = 1'b1;
            next_entry.ltype  = (mtype == RMISS_REQ) ? LT_DTY_SH : LT_DTY_DTY;
            next_entry.req_id = req;
            reply_type        = (mtype == RMISS_REQ) ? WBACK_REQ : WBACK_REQ_OWN;
            reply_dst         = dirty_id;
            cnt_class         = CNT_B;
          end
        end else if (mtype == RMISS_REQ) begin
          // uncached or shared: the block is clean
          action           = ACT_SUSPEND;
          next_entry.pbits = entry.pbits | req_bit;
          reply_type       = MISS_REPLY;
          cnt_class        = CNT_A;
        end else if (is_uncached || !other_shared) begin
          action           = ACT_SUSPEND;
          next_entry.pbits = req_bit;
          next_entry.dbit  = 1'b1;
          reply_type       = MISS_REPLY_OWN;
          cnt_class        = CNT_A;
        end else begin
          action            = ACT_SUSPEND;
          next_entry.pbits  = entry.pbits & ~req_bit;
          next_entry.locked = 1'b1;
          next_entry.ltype  = LT_SH_DTY_MISS;
          next_entry.req_id = req;
          reply_type        = INVALIDATION;
          cnt_class         = CNT_C;
        end
      end

      OWN_REQ: begin
        if (entry.locked) begin
          if (entry.ltype == LT_SH_DTY_OWN || entry.ltype == LT_SH_DTY_MISS)
            action = ACT_NACK;
          else
            action = ACT_ERROR;
        end else if (!is_shared || !pbit_req) begin
          action = ACT_ERROR;
        end else if (!other_shared) begin
          action          = ACT_SUSPEND;
          next_entry.dbit = 1'b1;
          reply_type      = OWN_REPLY;
          cnt_class       = CNT_B;
        end else begin
          action            = ACT_SUSPEND;
          next_entry.pbits  = entry.pbits & ~req_bit;
          next_entry.locked = 1'b1;
          next_entry.ltype  = LT_SH_DTY_OWN;
          next_entry.req_id = req;
          reply_type        = INVALIDATION;
          cnt_class         = CNT_C;
        end
      end

      INV_ACK: begin
        if (!entry.locked || entry.ltype == LT_DTY_SH || entry.ltype == LT_DTY_DTY) begin
          action = ACT_ERROR;
        end else begin
          action           = ACT_SUSPEND;
          next_entry.pbits = left_after_ack;
          if (left_after_ack == '0) begin
            next_entry.locked = 1'b0;
            next_entry.pbits  = rid_bit;
            next_entry.dbit   = 1'b1;
            reply_dst         = entry.req_id;
            if (entry.ltype == LT_SH_DTY_OWN) begin
              reply_type = OWN_REPLY;
              cnt_class  = CNT_B;
            end else begin
              reply_type = MISS_REPLY_OWN;
              cnt_class  = CNT_A;
            end
          end else begin
            reply_type = NULL_MSG;
            cnt_class  = CNT_D;
          end
        end
      end

      WBACK: begin
        if (is_dirty && req == dirty_id) begin
          action           = ACT_SUSPEND;
          store_block      = 1'b1;
          next_entry.pbits = '0;
          next_entry.dbit  = 1'b0;
          reply_type       = NULL_MSG;
          cnt_class        = CNT_E;
        end else if (entry.locked && entry.ltype == LT_DTY_SH && req == dirty_id) begin
          action            = ACT_SUSPEND;
          store_block       = 1'b1;
          next_entry.dbit   = 1'b0;
          next_entry.pbits  = entry.pbits | rid_bit;
          next_entry.locked = 1'b0;
          reply_type        = MISS_REPLY;
          reply_dst         = entry.req_id;
          cnt_class         = CNT_F;
        end else if (entry.locked && entry.ltype == LT_DTY_DTY && req == dirty_id) begin
          action            = ACT_SUSPEND;
          store_block       = 1'b1;
          next_entry.pbits  = (entry.pbits & ~dirty_bit) | rid_bit;
          next_entry.locked = 1'b0;
          reply_type        = MISS_REPLY_OWN;
          reply_dst         = entry.req_id;
          cnt_class         = CNT_F;
        end else begin
          action = ACT_ERROR;
        end
      end

      default: action = ACT_ERROR;
    endcase
  end

endmodule

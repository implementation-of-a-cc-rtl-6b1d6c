// rpm_pkg: types and constants shared by the blocks of one emulator board.
//
// The coherence protocol, its message names, the directory entry fields and
// their widths (10 presence bits, dirty, locked, 2-bit lock type, 4-bit
// requester id) and the six bank busy-time classes A..F follow the
// specification of the memory/directory controller.  The numeric encoding of
// message types, the layout of the 32-bit message header and the position of
// the directory fields inside a 32-bit DRAM word are choices of this design:
//
//   header word 0 : [31:27] type  [26:23] source node  [22:19] destination node
//                   [18:0]  zero
//   header word 1 : 32-bit emulated byte address
//   then 0, 1 or BLOCK_WORDS data words, depending on the type.
//
// Types with bit 4 clear are directed to a memory controller, types with bit 4
// set to a cache controller; the network interface routes on that bit.
package rpm_pkg;

  localparam int unsigned NODE_W    = 4;   // node id width
  localparam int unsigned NNODES    = 10;  // presence bit vector width
  localparam int unsigned WORD_W    = 32;

  typedef enum logic [4:0] {
    // requests to a memory controller
    RMISS_REQ      = 5'd0,
    WMISS_REQ      = 5'd1,
    OWN_REQ        = 5'd2,
    INV_ACK        = 5'd3,
    WBACK          = 5'd4,
    WWORD_REQ      = 5'd5,
    RWORD_REQ      = 5'd6,
    RBLOCK_REQ     = 5'd7,
    WBLOCK_REQ     = 5'd8,
    // messages to a cache controller
    MISS_REPLY     = 5'd16,
    MISS_REPLY_OWN = 5'd17,
    OWN_REPLY      = 5'd18,
    INVALIDATION   = 5'd19,
    WBACK_REQ      = 5'd20,
    WBACK_REQ_OWN  = 5'd21,
    NACK           = 5'd22,
    RWORD_REPLY    = 5'd23,
    RBLOCK_REPLY   = 5'd24,
    // internal marker: a suspended request that sends nothing when resumed
    NULL_MSG       = 5'd31
  } msg_type_e;

  typedef struct packed {
    msg_type_e           mtype;
    logic [NODE_W-1:0]   src;
    logic [NODE_W-1:0]   dst;
    logic [18:0]         rsvd;
  } msg_hdr_t;

  // Lock types of a locked directory entry
  typedef enum logic [1:0] {
    LT_SH_DTY_OWN  = 2'b00,
    LT_SH_DTY_MISS = 2'b01,
    LT_DTY_SH      = 2'b10,
    LT_DTY_DTY     = 2'b11
  } lock_type_e;

  // Directory entry, stored in the low 18 bits of a DRAM word
  typedef struct packed {
    logic [NODE_W-1:0]   req_id;
    lock_type_e          ltype;
    logic                locked;
    logic                dbit;
    logic [NNODES-1:0]   pbits;
  } dir_entry_t;

  localparam int unsigned DIR_W = $bits(dir_entry_t);  // 18

  // Bank busy-time classes (count values A..F)
  typedef enum logic [2:0] {
    CNT_A = 3'd0, CNT_B = 3'd1, CNT_C = 3'd2,
    CNT_D = 3'd3, CNT_E = 3'd4, CNT_F = 3'd5
  } cnt_class_e;

  // What the protocol decides for a coherence request
  typedef enum logic [1:0] {
    ACT_SUSPEND = 2'd0,  // update directory, suspend, send the reply later
    ACT_NACK    = 2'd1,  // reply nack at once, directory unchanged
    ACT_ERROR   = 2'd2   // protocol error, request dropped
  } dir_action_e;

  // State of a second-level cache blockframe
  typedef enum logic [3:0] {
    SLC_INV            = 4'd0,
    SLC_RO             = 4'd1,
    SLC_RW             = 4'd2,
    SLC_PEND_RO        = 4'd3,
    SLC_PEND_RW_INV    = 4'd4,
    SLC_PEND_RW_VAL    = 4'd5,
    SLC_PEND_PF_RO     = 4'd6,
    SLC_PEND_PF_RW_INV = 4'd7,
    SLC_PEND_PF_RW_VAL = 4'd8
  } slc_state_e;

  // Replacement grade: PENDING < RW < RO < INV
  function automatic logic [1:0] victim_grade(slc_state_e s);
    case (s)
      SLC_INV: return 2'd3;
      SLC_RO:  return 2'd2;
      SLC_RW:  return 2'd1;
      default: return 2'd0;
    endcase
  endfunction

  // Message length in words, header included
  function automatic int unsigned msg_len(msg_type_e t, int unsigned block_words);
    case (t)
      WBACK, WBLOCK_REQ, MISS_REPLY, MISS_REPLY_OWN, RBLOCK_REPLY: return 2 + block_words;
      WWORD_REQ, RWORD_REPLY:                                       return 3;
      default:                                                      return 2;
    endcase
  endfunction

  function automatic logic is_coherence(msg_type_e t);
    return (t == RMISS_REQ) || (t == WMISS_REQ) || (t == OWN_REQ) ||
           (t == INV_ACK) || (t == WBACK);
  endfunction

  function automatic logic [WORD_W-1:0] make_hdr(msg_type_e t, logic [NODE_W-1:0] s,
                                                 logic [NODE_W-1:0] d);
    msg_hdr_t h;
    h.mtype = t;
    h.src   = s;
    h.dst   = d;
    h.rsvd  = '0;
    return h;
  endfunction

endpackage

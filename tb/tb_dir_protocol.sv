// tb_dir_protocol: checks the directory protocol decision logic against a
// reference written state by state from the protocol's transition tables
// (one table per directory state) and its busy-time class table.  Random
// directory entries in every state (uncached, shared with one or several
// sharers, dirty, and the four locked states) are combined with every
// coherence message and random requesters, some equal to the dirty node.
module tb_dir_protocol;
  import rpm_pkg::*;

  msg_type_e         mtype;
  logic [NODE_W-1:0] req;
  dir_entry_t        entry;
  dir_action_e       action;
  dir_entry_t        next_entry;
  msg_type_e         reply_type;
  logic [NODE_W-1:0] reply_dst;
  cnt_class_e        cnt_class;
  logic              store_block;

  int checks = 0, failures = 0;
  int seen_nack = 0, seen_err = 0, seen_susp = 0;

  dir_protocol dut (.*);

  typedef struct {
    dir_action_e a;
    dir_entry_t  n;
    msg_type_e   t;
    logic [3:0]  d;
    cnt_class_e  c;
    logic        s;
  } exp_t;

  typedef enum {UNC, SHR, DTY, SDO, SDM, DSH, DDT} st_t;

  function automatic exp_t model(msg_type_e m, logic [3:0] r, dir_entry_t e);
    exp_t x;
    st_t  s;
    int   dirty = 0;
    logic other = 0;
    int   cnt = 0;
    x.a = ACT_ERROR; x.n = e; x.t = NULL_MSG; x.d = r; x.c = CNT_A; x.s = 0;
    for (int i = 0; i < 10; i++) begin
      if (e.pbits[i]) begin cnt++; if (cnt == 1) dirty = i; end
      if (e.pbits[i] && i != r) other = 1;
    end
    if (e.locked) s = (e.ltype == LT_SH_DTY_OWN) ? SDO : (e.ltype == LT_SH_DTY_MISS) ? SDM :
                      (e.ltype == LT_DTY_SH) ? DSH : DDT;
    else if (cnt == 0) s = UNC;
    else s = e.dbit ? DTY : SHR;
    case (s)
      UNC: case (m)
        RMISS_REQ: begin x.a = ACT_SUSPEND; x.n.pbits[r] = 1; x.t = MISS_REPLY; x.c = CNT_A; end
        WMISS_REQ: begin x.a = ACT_SUSPEND; x.n.pbits[r] = 1; x.n.dbit = 1; x.t = MISS_REPLY_OWN; x.c = CNT_A; end
        default: ;
      endcase
      SHR: case (m)
        RMISS_REQ: begin x.a = ACT_SUSPEND; x.n.pbits[r] = 1; x.t = MISS_REPLY; x.c = CNT_A; end
        WMISS_REQ: if (!other) begin
            x.a = ACT_SUSPEND; x.n.pbits[r] = 1; x.n.dbit = 1; x.t = MISS_REPLY_OWN; x.c = CNT_A;
          end else begin
            x.a = ACT_SUSPEND; x.n.pbits[r] = 0; x.n.locked = 1; x.n.ltype = LT_SH_DTY_MISS;
            x.n.req_id = r; x.t = INVALIDATION; x.c = CNT_C;
          end
        OWN_REQ: if (!e.pbits[r]) x.a = ACT_ERROR;
          else if (!other) begin x.a = ACT_SUSPEND; x.n.dbit = 1; x.t = OWN_REPLY; x.c = CNT_B; end
          else begin
            x.a = ACT_SUSPEND; x.n.pbits[r] = 0; x.n.locked = 1; x.n.ltype = LT_SH_DTY_OWN;
            x.n.req_id = r; x.t = INVALIDATION; x.c = CNT_C;
          end
        default: ;
      endcase
      DTY: case (m)
        RMISS_REQ, WMISS_REQ: if (r != dirty) begin
            x.a = ACT_SUSPEND; x.n.locked = 1; x.n.req_id = r; x.d = 4'(dirty); x.c = CNT_B;
            x.n.ltype = (m == RMISS_REQ) ? LT_DTY_SH : LT_DTY_DTY;
            x.t = (m == RMISS_REQ) ? WBACK_REQ : WBACK_REQ_OWN;
          end
        WBACK: if (r == dirty) begin
            x.a = ACT_SUSPEND; x.n.pbits[r] = 0; x.n.dbit = 0; x.t = NULL_MSG; x.c = CNT_E; x.s = 1;
          end
        default: ;
      endcase
      SDO, SDM: case (m)
        RMISS_REQ, WMISS_REQ, OWN_REQ: x.a = ACT_NACK;
        INV_ACK: begin
          x.a = ACT_SUSPEND;
          x.n.pbits[r] = 0;
          if (x.n.pbits == 0) begin
            x.n.pbits[e.req_id] = 1; x.n.dbit = 1; x.n.locked = 0; x.d = e.req_id;
            x.t = (s == SDO) ? OWN_REPLY : MISS_REPLY_OWN;
            x.c = (s == SDO) ? CNT_B : CNT_A;
          end else begin
            x.t = NULL_MSG; x.c = CNT_D;
          end
        end
        default: ;
      endcase
      DSH, DDT: case (m)
        RMISS_REQ, WMISS_REQ: x.a = (r != dirty) ? ACT_NACK : ACT_ERROR;
        WBACK: if (r == dirty) begin
            x.a = ACT_SUSPEND; x.s = 1; x.n.locked = 0; x.d = e.req_id; x.c = CNT_F;
            if (s == DSH) begin x.n.dbit = 0; x.n.pbits[e.req_id] = 1; x.t = MISS_REPLY; end
            else begin x.n.pbits[dirty] = 0; x.n.pbits[e.req_id] = 1; x.t = MISS_REPLY_OWN; end
          end
        default: ;
      endcase
    endcase
    return x;
  endfunction

  function automatic logic [9:0] rand_vec(int kind);
    logic [9:0] v;
    case (kind)
      0: v = '0;
      1: begin v = '0; v[$urandom_range(9)] = 1; end
      default: begin v = 10'($urandom); if ($countones(v) < 2) v[$urandom_range(9)] = 1; end
    endcase
    return v;
  endfunction

  initial begin
    msg_type_e types [5] = '{RMISS_REQ, WMISS_REQ, OWN_REQ, INV_ACK, WBACK};
    exp_t x;
    for (int n = 0; n < 4000; n++) begin
      int st;
      st = $urandom_range(6);
      entry = '0;
      entry.req_id = 4'($urandom_range(9));
      case (st)
        0: entry.pbits = '0;
        1: entry.pbits = rand_vec($urandom_range(1, 2));
        2: begin entry.pbits = rand_vec(1); entry.dbit = 1; end
        3: begin entry.pbits = rand_vec($urandom_range(1, 2)); entry.locked = 1; entry.ltype = LT_SH_DTY_OWN; end
        4: begin entry.pbits = rand_vec($urandom_range(1, 2)); entry.locked = 1; entry.ltype = LT_SH_DTY_MISS; end
        5: begin entry.pbits = rand_vec(1); entry.dbit = 1; entry.locked = 1; entry.ltype = LT_DTY_SH; end
        default: begin entry.pbits = rand_vec(1); entry.dbit = 1; entry.locked = 1; entry.ltype = LT_DTY_DTY; end
      endcase
      mtype = types[$urandom_range(4)];
      // requester: often a present node (the dirty one or a sharer)
      if ($urandom_range(1) == 1 && entry.pbits != 0) begin
        do req = 4'($urandom_range(9)); while (!entry.pbits[req]);
      end else req = 4'($urandom_range(9));
      #1;
      x = model(mtype, req, entry);
      checks++;
      if (action != x.a) begin
        failures++;
        if (failures < 10) $display("FAIL action m=%s req=%0d e=%h: got %s exp %s", mtype.name(), req, entry, action.name(), x.a.name());
      end else if (action == ACT_SUSPEND) begin
        checks++;
        if (next_entry != x.n || reply_type != x.t || cnt_class != x.c || store_block != x.s ||
            (reply_type != INVALIDATION && reply_type != NULL_MSG && reply_dst != x.d)) begin
          failures++;
          if (failures < 10)
            $display("FAIL m=%s req=%0d e=%h: got n=%h %s d=%0d c=%0d s=%0d exp n=%h %s d=%0d c=%0d s=%0d",
                     mtype.name(), req, entry, next_entry, reply_type.name(), reply_dst, cnt_class, store_block,
                     x.n, x.t.name(), x.d, x.c, x.s);
        end
      end
      case (action)
        ACT_NACK: seen_nack++;
        ACT_ERROR: seen_err++;
        default: seen_susp++;
      endcase
    end
    checks++;
    if (seen_nack == 0 || seen_err == 0 || seen_susp == 0) failures++;
    $display("suspend=%0d nack=%0d error=%0d", seen_susp, seen_nack, seen_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_nic: network interface with its three FIFO pairs modelled by queues.
// Each port's unit writes random messages (headers naming remote nodes,
// local requests and local replies; short and block-sized) and signals each
// whole message.  The testbench checks that every message arrives whole and
// in order at the port its header names (network for a remote node, memory
// controller for a local request, cache controller for a local reply), that
// msg_avail counts the delivered messages, that the network port wins when
// it and the cache port are both ready, and that a message from the memory
// controller to itself raises `error` and is discarded.
module tb_nic;
  import rpm_pkg::*;

  localparam int BW = 8;
  localparam logic [3:0] BOARD = 4'd2;

  logic clk = 0, rst = 1;
  logic [2:0] in_empty, in_rd, out_full, out_wr, unit_inc = 0, unit_dec = 0, msg_avail, in_overflow;
  logic [2:0][31:0] in_data, out_data;
  logic error, busy;

  nic #(.BLOCK_WORDS(BW), .MAX_MSGS(4)) dut (.clk, .rst, .board_id(BOARD), .in_empty, .in_data, .in_rd,
      .out_full, .out_wr, .out_data, .unit_inc, .unit_dec, .msg_avail, .in_overflow, .error, .busy);

  always #5 clk = ~clk;

  logic [31:0] inq[3][$];
  logic [31:0] outq[3][$];
  logic [31:0] expq[3][3][$];   // [src][dst] expected address words, in order
  int checks = 0, failures = 0, n_err = 0, received = 0, sent = 0;
  int first_src = -1;

  always @(posedge clk) begin
    for (int p = 0; p < 3; p++) begin
      if (in_rd[p]) void'(inq[p].pop_front());
      if (out_wr[p]) outq[p].push_back(out_data[p]);
    end
    if (error) n_err++;
  end

  always @(negedge clk) begin
    for (int p = 0; p < 3; p++) begin
      in_empty[p] = (inq[p].size() == 0);
      in_data[p]  = in_empty[p] ? 32'h0 : inq[p][0];
      out_full[p] = ($urandom_range(5) == 0);
    end
  end

  task automatic put_msg(int s, msg_type_e t, logic [3:0] dnode, logic [31:0] tagw, bit record = 1);
    int len, d;
    len = msg_len(t, BW);
    d = (dnode != BOARD) ? 0 : (t < 16) ? 2 : 1;
    // a unit does not start a message while its FIFO is at the message limit
    while (in_overflow[s]) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) drain(k);
    end
    inq[s].push_back(make_hdr(t, 4'(s), dnode));
    inq[s].push_back(tagw);
    for (int i = 2; i < len; i++) inq[s].push_back(tagw + i);
    if (record) expq[s][d].push_back(tagw);
    @(negedge clk); unit_inc[s] = 1;
    @(negedge clk); unit_inc[s] = 0;
    sent++;
  endtask

  // take whole messages off one output queue and check them
  task automatic drain(int d);
    while (outq[d].size() >= 2) begin
      msg_hdr_t h;
      int len, s;
      logic [31:0] a;
      h = msg_hdr_t'(outq[d][0]);
      len = msg_len(h.mtype, BW);
      if (outq[d].size() < len) break;
      void'(outq[d].pop_front());
      a = outq[d].pop_front();
      s = int'(h.src);
      checks++;
      if (s > 2 || expq[s][d].size() == 0 || expq[s][d][0] != a) begin
        failures++;
        $display("FAIL port %0d got msg from %0d tag %h", d, s, a);
      end else void'(expq[s][d].pop_front());
      for (int i = 2; i < len; i++) begin
        logic [31:0] w = outq[d].pop_front();
        checks++;
        if (w != a + i) begin failures++; $display("FAIL data word"); end
      end
      if (first_src < 0) first_src = s;
      checks++;
      if (!msg_avail[d]) begin failures++; $display("FAIL msg_avail low at port %0d", d); end
      @(negedge clk); unit_dec[d] = 1;
      @(negedge clk); unit_dec[d] = 0;
      received++;
    end
  endtask

  initial begin
    msg_type_e ty [6] = '{RMISS_REQ, WBACK, INV_ACK, MISS_REPLY, INVALIDATION, RWORD_REPLY};
    repeat (3) @(negedge clk);
    rst = 0;
    // priority: network and cache both ready at once, network must go first
    inq[1].push_back(make_hdr(MISS_REPLY, 4'd1, 4'd5));
    inq[1].push_back(32'h1000_0000);
    for (int i = 2; i < 2 + BW; i++) inq[1].push_back(32'h1000_0000 + i);
    expq[1][0].push_back(32'h1000_0000);
    inq[0].push_back(make_hdr(RMISS_REQ, 4'd0, BOARD));
    inq[0].push_back(32'h0000_0000);
    expq[0][2].push_back(32'h0000_0000);
    @(negedge clk); unit_inc[1:0] = 2'b11;
    @(negedge clk); unit_inc = 0;
    repeat (80) begin @(negedge clk); for (int d = 0; d < 3; d++) drain(d); end
    checks++;
    if (first_src != 0) begin failures++; $display("FAIL priority: first from %0d", first_src); end

    // random traffic
    for (int n = 0; n < 300; n++) begin
      int s, k;
      logic [3:0] dn;
      msg_type_e t;
      s = $urandom_range(2);
      t = ty[$urandom_range(5)];
      k = $urandom_range(2);
      dn = (k == 0) ? 4'd7 : BOARD;     // remote or local
      // keep destination different from source
      if (s == 0 && dn != BOARD) dn = BOARD;
      if (s == 2 && dn == BOARD && t < 16) t = MISS_REPLY;
      if (s == 1 && dn == BOARD && t >= 16) t = RMISS_REQ;
      put_msg(s, t, dn, {4'(s), 12'(n), 16'h0});
      for (int d = 0; d < 3; d++) drain(d);
    end
    // error: memory controller to itself
    put_msg(2, RMISS_REQ, BOARD, 32'hEEEE_0000, 0);
    repeat (3000) begin @(negedge clk); for (int d = 0; d < 3; d++) drain(d); end
    for (int s = 0; s < 3; s++) for (int d = 0; d < 3; d++) begin
      checks++;
      if (expq[s][d].size() != 0) begin failures++; $display("FAIL %0d messages %0d->%0d lost", expq[s][d].size(), s, d); end
    end
    checks++;
    if (n_err != 1 || inq[2].size() != 0) begin failures++; $display("FAIL error count %0d", n_err); end
    $display("sent=%0d received=%0d errors=%0d", sent, received, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

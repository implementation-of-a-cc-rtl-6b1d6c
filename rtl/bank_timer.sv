// bank_timer: time-out circuit of one emulated interleaved memory bank.
//
// When the controller suspends a request it puts the bank's busy time on
// `count` and pulses `loadcount`.  That loads an n-bit countdown counter and
// clears the bank's free flag, so `busy` rises.  The counter then decrements
// once per `tick` (one emulated processor clock) until it reaches zero.
// `timeout` is high while the bank is busy and its count is zero: the
// suspended request may now resume.  When the controller has finished the
// request it pulses `free`, which sets the flag again and drops `busy`.
//
// The counter, the busy flip-flop, the load/free/count inputs and the
// busy/time-out outputs follow the bank time-out circuit of the
// memory/directory controller.  Its active-low pins are active-high here.
// The original gates the counter clock; this version uses a count enable
// instead, with the same effect.  The `tick` input, the counter width and a
// synchronous, active-high reset that frees the bank are this design's
// choices.  A load of zero gives a time-out at once.
module bank_timer #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             tick,
  input  logic             loadcount,
  input  logic [CNT_W-1:0] count,
  input  logic             free,
  output logic             busy,
  output logic             timeout
);

  logic [CNT_W-1:0] cnt_q;
  logic             free_q;   // the flip-flop: 1 = bank free

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q  <= '0;
      free_q <= 1'b1;
    end else begin
      if (loadcount) begin
        cnt_q  <= count;
        free_q <= 1'b0;
      end else begin
        if (tick && cnt_q != '0) cnt_q <= cnt_q - 1'b1;
        if (free)                free_q <= 1'b1;
      end
    end
  end

  assign busy    = !free_q;
  assign timeout = !free_q && (cnt_q == '0);

endmodule

// nic_fifo_ctrl: message bookkeeping for one bidirectional FIFO pair of the
// network interface.
//
// The words of a message cross the FIFOs one at a time, so word counts alone
// cannot tell whether a complete message is waiting.  This block keeps two
// up/down message counters.  The incoming counter (unit to network
// interface) counts up when the attached unit pulses `unit_inc` after
// writing a whole message, and down when the interface controller pulses
// `nic_dec` after reading one.  The outgoing counter counts up on `nic_inc`
// and down on `unit_dec`.  A simultaneous up and down leaves a counter
// unchanged.
//   msg_ready     : the incoming FIFO holds at least one whole message
//   out_avail     : the outgoing FIFO holds at least one whole message
//   in_overflow   : the incoming FIFO holds MAX_MSGS messages; the unit must
//                   not start another one
//   out_overflow  : the same for the outgoing FIFO; the controller must not
//                   start another one
// The two counters, the inc/dec/overflow signals and the limit of 120 block
// messages per 4,096-word FIFO follow the interface description.  Counter
// width, a synchronous active-high reset and the exact overflow threshold
// (count >= MAX_MSGS) are this design's choices.
module nic_fifo_ctrl #(
  parameter int unsigned MAX_MSGS = 120
) (
  input  logic clk,
  input  logic rst,
  input  logic unit_inc,
  input  logic nic_dec,
  input  logic nic_inc,
  input  logic unit_dec,
  output logic msg_ready,
  output logic out_avail,
  output logic in_overflow,
  output logic out_overflow
);

  localparam int unsigned CW = $clog2(MAX_MSGS + 1) + 1;

  logic [CW-1:0] in_cnt, out_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_cnt  <= '0;
      out_cnt <= '0;
    end else begin
      case ({unit_inc, nic_dec && in_cnt != '0})
        2'b10:   in_cnt <= in_cnt + 1'b1;
        2'b01:   in_cnt <= in_cnt - 1'b1;
        default: ;
      endcase
      case ({nic_inc, unit_dec && out_cnt != '0})
        2'b10:   out_cnt <= out_cnt + 1'b1;
        2'b01:   out_cnt <= out_cnt - 1'b1;
        default: ;
      endcase
    end
  end

  assign msg_ready    = (in_cnt != '0);
  assign out_avail    = (out_cnt != '0);
  assign in_overflow  = (in_cnt >= CW'(MAX_MSGS));
  assign out_overflow = (out_cnt >= CW'(MAX_MSGS));

endmodule

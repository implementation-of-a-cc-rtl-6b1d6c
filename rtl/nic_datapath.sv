// nic_datapath: word switch of the network interface.
//
// Three ports: 0 = network chip (LIFE), 1 = second-level cache controller,
// 2 = memory controller.  Each outgoing FIFO is fed by a 2-to-1 multiplexer
// that picks one of the two other ports' incoming FIFOs, so a message can
// never be sent back where it came from.  When `xfer` is high one word moves
// from port `src` to port `dst`: the source FIFO is popped and the
// destination FIFO written in the same clock.  Combinational.
//
// Three 2-to-1 multiplexers follow the interface description; the port
// numbering and the enable logic are this design's.
module nic_datapath #(
  parameter int unsigned W = 32
) (
  input  logic [2:0][W-1:0] in_data,
  input  logic [1:0]        src,
  input  logic [1:0]        dst,
  input  logic              xfer,
  output logic [2:0]        in_rd,
  output logic [2:0]        out_wr,
  output logic [2:0][W-1:0] out_data
);

  always_comb begin
    for (int d = 0; d < 3; d++) begin
      // candidates for output d: ports (d+1)%3 and (d+2)%3
      if (int'(src) == (d + 2) % 3) out_data[d] = in_data[(d + 2) % 3];
      else                          out_data[d] = in_data[(d + 1) % 3];
      out_wr[d] = xfer && (int'(dst) == d) && (src != dst);
      in_rd[d]  = xfer && (int'(src) == d) && (src != dst);
    end
  end

endmodule

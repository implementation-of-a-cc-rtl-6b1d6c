// msg_fifo: one of the word FIFOs that join the network interface to the
// memory controller, the second-level cache controller and the network chip.
//
// A synchronous first-in first-out buffer of DEPTH words.  The word at the
// head is always visible on rd_data while `empty` is low (show-ahead), and
// rd_en pops it.  A write with the FIFO full and a read with it empty are
// ignored.  `level` is the number of words held.  Read and write may happen
// in the same clock.
//
// The depth of 4,096 words follows the board description; the FIFOs there
// are separate chips, modelled here as a register array.  The show-ahead
// read port and the synchronous, active-high reset are this design's choices.
module msg_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr_en,
  input  logic [W-1:0]             wr_data,
  output logic                     full,
  input  logic                     rd_en,
  output logic [W-1:0]             rd_data,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign full    = (level == (AW+1)'(DEPTH));
  assign empty   = (level == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: level <= level;
      endcase
    end
  end

endmodule

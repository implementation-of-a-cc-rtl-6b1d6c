// rpm_board: one emulator board, with its second-level cache controller.
//
// The message and memory side of the board (rpm_node: the network
// interface, the six message FIFOs, the memory/directory controller, the
// phase sequencer and the address decoder) is joined to the control unit of
// the second-level cache (slcc_ctrl) on the interface's port 1.  Read misses
// and writes of the first-level cache enter at `flc_req`.  The second-level
// cache turns them into coherence messages, which go to the home memory
// controller: this board's own, through port 2, or another board's, through
// the network chip on port 0.  It also answers the invalidations and
// write-back requests that the home controllers send it.
//
// Outside the board, and seen through ports:
//   * the network chip (life_*);
//   * the DRAM with its controller chip (mem_*);
//   * the data SRAM of the second-level cache (slm_*, asynchronous read);
//   * the processor's address-space id and address for the decoder;
//   * the first-level cache controller (flc_*: a request held until
//     flc_done).
// The cache controller reads its input FIFO word by word as words arrive, so
// it does not use the interface's message-available flag for port 1.
// Timing and formats are those of the blocks.  How the blocks are divided
// follows the board description.  The one-request interface between the
// cache levels is this design's choice.
module rpm_board
  import rpm_pkg::*;
#(
  parameter int unsigned BLOCK_WORDS = 32,
  parameter int unsigned FIFO_DEPTH  = 4096,
  parameter int unsigned MAX_MSGS    = 120,
  parameter int unsigned NBANKS      = 4,
  parameter int unsigned CNT_W       = 16,
  parameter int unsigned MEM_AW      = 24,
  parameter int unsigned SLC_SETS    = 16384,
  parameter int unsigned SLC_ASSOC   = 2
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [NODE_W-1:0]      board_id,
  input  logic [5:0][CNT_W-1:0]  susp_time,
  // network chip side
  input  logic                   life_wr,
  input  logic [WORD_W-1:0]      life_wdata,
  output logic                   life_full,
  input  logic                   life_inc,
  input  logic                   life_rd,
  output logic [WORD_W-1:0]      life_rdata,
  output logic                   life_empty,
  input  logic                   life_dec,
  output logic                   life_msg_avail,
  output logic                   life_in_overflow,
  // first-level cache controller requests
  input  logic                   flc_req,
  input  logic                   flc_we,
  input  logic [31:0]            flc_addr,
  input  logic [WORD_W-1:0]      flc_wdata,
  output logic                   flc_done,
  output logic [WORD_W-1:0]      flc_rdata,
  output logic                   slc_busy,
  // second-level cache data SRAM
  output logic [$clog2(SLC_SETS*SLC_ASSOC*BLOCK_WORDS)-1:0] slm_addr,
  output logic                   slm_we,
  output logic [WORD_W-1:0]      slm_wdata,
  input  logic [WORD_W-1:0]      slm_rdata,
  // DRAM port
  output logic                   mem_req,
  output logic                   mem_we,
  output logic [MEM_AW-1:0]      mem_addr,
  output logic [WORD_W-1:0]      mem_wdata,
  input  logic                   mem_ack,
  input  logic [WORD_W-1:0]      mem_rdata,
  // processor address classification
  input  logic [7:0]             asi,
  input  logic [31:0]            paddr,
  output logic                   testmode,
  output logic [2:0]             region,
  output logic [12:0]            io_sel,
  output logic                   addr_err,
  // status and events
  output logic                   mc_error,
  output logic                   nic_error,
  output logic [NBANKS-1:0]      bank_busy,
  output logic [7:0]             pclk_phase,
  output logic                   ev_suspend,
  output logic                   ev_resume,
  output logic                   ev_nack,
  output logic                   ev_blocked,
  output logic                   ev_inval,
  output logic                   slc_in_overflow
);

  logic              slc_wr, slc_full, slc_inc, slc_rd, slc_empty, slc_dec, slc_msg_avail;
  logic [WORD_W-1:0] slc_wdata, slc_rdata;

  rpm_node #(
    .BLOCK_WORDS(BLOCK_WORDS),
    .FIFO_DEPTH (FIFO_DEPTH),
    .MAX_MSGS   (MAX_MSGS),
    .NBANKS     (NBANKS),
    .CNT_W      (CNT_W),
    .MEM_AW     (MEM_AW)
  ) u_node (.*);

  slcc_ctrl #(
    .BLOCK_WORDS(BLOCK_WORDS),
    .NSETS      (SLC_SETS),
    .ASSOC      (SLC_ASSOC)
  ) u_slcc (
    .clk      (clk),
    .rst      (rst),
    .node_id  (board_id),
    .req      (flc_req),
    .req_we   (flc_we),
    .req_addr (flc_addr),
    .req_wdata(flc_wdata),
    .done     (flc_done),
    .rdata    (flc_rdata),
    .busy     (slc_busy),
    .out_wr   (slc_wr),
    .out_data (slc_wdata),
    .out_full (slc_full),
    .out_inc  (slc_inc),
    .in_empty (slc_empty),
    .in_data  (slc_rdata),
    .in_rd    (slc_rd),
    .in_dec   (slc_dec),
    .slm_addr (slm_addr),
    .slm_we   (slm_we),
    .slm_wdata(slm_wdata),
    .slm_rdata(slm_rdata)
  );

endmodule

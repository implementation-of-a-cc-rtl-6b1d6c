// rpm_node: the message and memory side of one emulator board.
//
// A board is a node of the emulated CC-NUMA machine.  Its network interface
// (nic) joins three FIFO pairs: one to the network chip that reaches the
// other boards, one to the second-level cache controller and one to the
// memory/directory controller.  The memory/directory controller
// (mem_dir_ctrl) is the home of the blocks stored in this board's DRAM: it
// keeps their full-map directory, answers read misses, write misses and
// ownership requests, sends invalidations and write-back requests, and holds
// every answer back for the time the emulated memory bank would be busy.
// The phase sequencer (seq6) divides the system clock by eight into
// emulated processor clocks, which time those bank delays.  The first-level
// cache's address-space decoder (flc_mapper) sits beside them and classifies
// processor accesses.
//
// The six FIFOs are msg_fifo instances of FIFO_DEPTH words.  The network
// chip, the second-level cache controller, the DRAM with its controller chip
// and the processor are outside; their signals are ports:
//   life_* / slc_* : write side of the FIFO towards the interface
//                    (wr, wdata, full) with `inc` after each whole message,
//                    read side of the FIFO from the interface (rd, rdata,
//                    empty) with `dec` after each whole message, plus
//                    msg_avail and in_overflow from its message counters;
//   mem_*          : word-wide DRAM request/acknowledge port (see
//                    mem_dir_ctrl);
//   asi, paddr     : processor address-space id and address for the mapper.
// Block size, number of banks and busy times are parameters or inputs; see
// the blocks for which parts follow the board description and which are
// this design's choices.
module rpm_node
  import rpm_pkg::*;
#(
  parameter int unsigned BLOCK_WORDS = 32,
  parameter int unsigned FIFO_DEPTH  = 4096,
  parameter int unsigned MAX_MSGS    = 120,
  parameter int unsigned NBANKS      = 4,
  parameter int unsigned CNT_W       = 16,
  parameter int unsigned MEM_AW      = 24
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [NODE_W-1:0]      board_id,
  input  logic [5:0][CNT_W-1:0]  susp_time,
  // network chip side (port 0)
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
  // second-level cache controller side (port 1)
  input  logic                   slc_wr,
  input  logic [WORD_W-1:0]      slc_wdata,
  output logic                   slc_full,
  input  logic                   slc_inc,
  input  logic                   slc_rd,
  output logic [WORD_W-1:0]      slc_rdata,
  output logic                   slc_empty,
  input  logic                   slc_dec,
  output logic                   slc_msg_avail,
  output logic                   slc_in_overflow,
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
  output logic                   ev_inval
);

  localparam int unsigned LW = $clog2(FIFO_DEPTH) + 1;

  // FIFOs towards the interface (index = port) and from it
  logic [2:0]              ti_wr, ti_full, ti_rd, ti_empty;
  logic [2:0][WORD_W-1:0]  ti_wdata, ti_rdata;
  logic [2:0]              fi_wr, fi_full, fi_rd, fi_empty;
  logic [2:0][WORD_W-1:0]  fi_wdata, fi_rdata;
  logic [2:0][LW-1:0]      ti_level, fi_level;
  logic [2:0]              unit_inc, unit_dec, msg_avail, in_ovf;

  for (genvar p = 0; p < 3; p++) begin : g_fifo
    msg_fifo #(.W(WORD_W), .DEPTH(FIFO_DEPTH)) u_to_nic (
      .clk(clk), .rst(rst),
      .wr_en(ti_wr[p]), .wr_data(ti_wdata[p]), .full(ti_full[p]),
      .rd_en(ti_rd[p]), .rd_data(ti_rdata[p]), .empty(ti_empty[p]),
      .level(ti_level[p])
    );
    msg_fifo #(.W(WORD_W), .DEPTH(FIFO_DEPTH)) u_from_nic (
      .clk(clk), .rst(rst),
      .wr_en(fi_wr[p]), .wr_data(fi_wdata[p]), .full(fi_full[p]),
      .rd_en(fi_rd[p]), .rd_data(fi_rdata[p]), .empty(fi_empty[p]),
      .level(fi_level[p])
    );
  end

  logic nic_busy;

  nic #(.BLOCK_WORDS(BLOCK_WORDS), .MAX_MSGS(MAX_MSGS)) u_nic (
    .clk        (clk),
    .rst        (rst),
    .board_id   (board_id),
    .in_empty   (ti_empty),
    .in_data    (ti_rdata),
    .in_rd      (ti_rd),
    .out_full   (fi_full),
    .out_wr     (fi_wr),
    .out_data   (fi_wdata),
    .unit_inc   (unit_inc),
    .unit_dec   (unit_dec),
    .msg_avail  (msg_avail),
    .in_overflow(in_ovf),
    .error      (nic_error),
    .busy       (nic_busy)
  );

  // external ports 0 and 1
  assign ti_wr[0]    = life_wr;
  assign ti_wdata[0] = life_wdata;
  assign life_full   = ti_full[0];
  assign unit_inc[0] = life_inc;
  assign fi_rd[0]    = life_rd;
  assign life_rdata  = fi_rdata[0];
  assign life_empty  = fi_empty[0];
  assign unit_dec[0] = life_dec;
  assign life_msg_avail   = msg_avail[0];
  assign life_in_overflow = in_ovf[0];

  assign ti_wr[1]    = slc_wr;
  assign ti_wdata[1] = slc_wdata;
  assign slc_full    = ti_full[1];
  assign unit_inc[1] = slc_inc;
  assign fi_rd[1]    = slc_rd;
  assign slc_rdata   = fi_rdata[1];
  assign slc_empty   = fi_empty[1];
  assign unit_dec[1] = slc_dec;
  assign slc_msg_avail   = msg_avail[1];
  assign slc_in_overflow = in_ovf[1];

  // processor clock phases
  logic [2:0] phase_idx;
  logic       pclk_start;

  seq6 #(.STEPS(8)) u_seq (
    .clk       (clk),
    .rst       (rst),
    .phase     (pclk_phase),
    .phase_idx (phase_idx),
    .pclk_start(pclk_start)
  );

  // memory/directory controller on port 2
  mem_dir_ctrl #(
    .BLOCK_WORDS(BLOCK_WORDS),
    .NBANKS     (NBANKS),
    .CNT_W      (CNT_W),
    .MEM_AW     (MEM_AW)
  ) u_mc (
    .clk         (clk),
    .rst         (rst),
    .tick        (pclk_start),
    .node_id     (board_id),
    .susp_time   (susp_time),
    .in_empty    (fi_empty[2]),
    .in_data     (fi_rdata[2]),
    .in_rd       (fi_rd[2]),
    .in_msg_done (unit_dec[2]),
    .out_full    (ti_full[2]),
    .out_ovf     (in_ovf[2]),
    .out_wr      (ti_wr[2]),
    .out_data    (ti_wdata[2]),
    .out_msg_done(unit_inc[2]),
    .mem_req     (mem_req),
    .mem_we      (mem_we),
    .mem_addr    (mem_addr),
    .mem_wdata   (mem_wdata),
    .mem_ack     (mem_ack),
    .mem_rdata   (mem_rdata),
    .error       (mc_error),
    .bank_busy   (bank_busy),
    .ev_suspend  (ev_suspend),
    .ev_resume   (ev_resume),
    .ev_nack     (ev_nack),
    .ev_blocked  (ev_blocked),
    .ev_inval    (ev_inval)
  );

  logic sp_mc, sp_slc, sp_flc, sp_io;
  logic [3:0] io_dev;

  flc_mapper u_map (
    .asi     (asi),
    .addr    (paddr),
    .testmode(testmode),
    .sp_mc   (sp_mc),
    .sp_slc  (sp_slc),
    .sp_flc  (sp_flc),
    .sp_io   (sp_io),
    .region  (region),
    .io_dev  (io_dev),
    .io_sel  (io_sel),
    .addr_err(addr_err)
  );

endmodule

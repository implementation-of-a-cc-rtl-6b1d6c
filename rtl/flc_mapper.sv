// flc_mapper: address-space decoder of the first-level cache data unit.
//
// Classifies each processor access by its address space identifier (ASI)
// and address so that the cache control unit can pick its next state.
//   ASI 0x01 : test-mode access to the memory controller's DRAM
//   ASI 0x02 : test-mode access to the second-level cache SRAM
//   ASI 0x03 : test-mode access to the first-level cache SRAM
//   ASI 0x05 : memory-mapped I/O; the device is address bits [23:20]
//   others   : normal (emulated) access through the cache hierarchy
// For the three memory spaces `region` names the area the address falls in,
// and `addr_err` flags an address above the end of the space or an I/O
// address with no device.  For I/O, io_dev is the device number and io_sel
// its one-hot select.
//
//   FLC space : 0 data (1 MB) | 1 tag/state 0x0100000 | 2 buffers 0x0140000 |
//               3 performance 0x0160000 | 4 TLB 0x0180000..0x01FFFFF
//   SLC space : 0 data (4 MB) | 1 tag/state 0x0400000 | 2 buffers 0x0500000 |
//               3 trace/performance 0x0600000..0x07FFFFF
//   MC space  : 0 shared data (31 MB) | 5 private data 0x1F00000 |
//               1 directory 0x2000000 | 6 interleaving 0x2800000 |
//               3 performance 0x3000000 | 7 reserved 0x3800000..0x3FFFFFF
//   I/O       : 13 devices, 0x0 control register .. 0xC delay-unit init
//
// The ASI values, the region boundaries and the I/O device map follow the
// test-mode memory map of the board.  Which ASIs count as test mode and the
// region numbering are this design's choices.  The mapping of emulated
// addresses onto performance-counter addresses is not covered.
// Combinational.
module flc_mapper (
  input  logic [7:0]  asi,
  input  logic [31:0] addr,
  output logic        testmode,
  output logic        sp_mc,
  output logic        sp_slc,
  output logic        sp_flc,
  output logic        sp_io,
  output logic [2:0]  region,
  output logic [3:0]  io_dev,
  output logic [12:0] io_sel,
  output logic        addr_err
);

  always_comb begin
    sp_mc    = (asi == 8'h01);
    sp_slc   = (asi == 8'h02);
    sp_flc   = (asi == 8'h03);
    sp_io    = (asi == 8'h05);
    testmode = sp_mc || sp_slc || sp_flc || sp_io;
    region   = '0;
    io_dev   = addr[23:20];
    io_sel   = '0;
    addr_err = 1'b0;

    if (sp_flc) begin
      if      (addr < 32'h0010_0000) region = 3'd0;
      else if (addr < 32'h0014_0000) region = 3'd1;
      else if (addr < 32'h0016_0000) region = 3'd2;
      else if (addr < 32'h0018_0000) region = 3'd3;
      else if (addr < 32'h0020_0000) region = 3'd4;
      else                           addr_err = 1'b1;
    end else if (sp_slc) begin
      if      (addr < 32'h0040_0000) region = 3'd0;
      else if (addr < 32'h0050_0000) region = 3'd1;
      else if (addr < 32'h0060_0000) region = 3'd2;
      else if (addr < 32'h0080_0000) region = 3'd3;
      else                           addr_err = 1'b1;
    end else if (sp_mc) begin
      if      (addr < 32'h01F0_0000) region = 3'd0;
      else if (addr < 32'h0200_0000) region = 3'd5;
      else if (addr < 32'h0280_0000) region = 3'd1;
      else if (addr < 32'h0300_0000) region = 3'd6;
      else if (addr < 32'h0380_0000) region = 3'd3;
      else if (addr < 32'h0400_0000) region = 3'd7;
      else                           addr_err = 1'b1;
    end else if (sp_io) begin
      if (io_dev <= 4'hC) io_sel[io_dev] = 1'b1;
      else                addr_err = 1'b1;
    end
  end

endmodule

// tb_flc_mapper: probes every region boundary of the three test-mode memory
// spaces (first and last byte of each area, and the first byte past the
// end), every I/O device nibble, and normal address spaces, against the
// memory map written out as a table here.
module tb_flc_mapper;
  logic [7:0] asi;
  logic [31:0] addr;
  logic testmode, sp_mc, sp_slc, sp_flc, sp_io, addr_err;
  logic [2:0] region;
  logic [3:0] io_dev;
  logic [12:0] io_sel;
  int checks = 0, failures = 0;

  flc_mapper dut (.*);

  task automatic probe(logic [7:0] a, logic [31:0] ad, logic tm, logic [2:0] reg_e, logic err);
    asi = a; addr = ad; #1;
    checks++;
    if (testmode != tm || addr_err != err || (!err && tm && a != 8'h05 && region != reg_e)) begin
      failures++;
      $display("FAIL asi=%h addr=%h: tm=%0d region=%0d err=%0d", a, ad, testmode, region, addr_err);
    end
  endtask

  task automatic area(logic [7:0] a, logic [31:0] lo, logic [31:0] hi, logic [2:0] r);
    probe(a, lo, 1, r, 0);
    probe(a, hi - 1, 1, r, 0);
    probe(a, lo + (hi - lo) / 2, 1, r, 0);
  endtask

  initial begin
    area(8'h03, 32'h0000000, 32'h0100000, 0);
    area(8'h03, 32'h0100000, 32'h0140000, 1);
    area(8'h03, 32'h0140000, 32'h0160000, 2);
    area(8'h03, 32'h0160000, 32'h0180000, 3);
    area(8'h03, 32'h0180000, 32'h0200000, 4);
    probe(8'h03, 32'h0200000, 1, 0, 1);
    area(8'h02, 32'h0000000, 32'h0400000, 0);
    area(8'h02, 32'h0400000, 32'h0500000, 1);
    area(8'h02, 32'h0500000, 32'h0600000, 2);
    area(8'h02, 32'h0600000, 32'h0800000, 3);
    probe(8'h02, 32'h0800000, 1, 0, 1);
    area(8'h01, 32'h0000000, 32'h1F00000, 0);
    area(8'h01, 32'h1F00000, 32'h2000000, 5);
    area(8'h01, 32'h2000000, 32'h2800000, 1);
    area(8'h01, 32'h2800000, 32'h3000000, 6);
    area(8'h01, 32'h3000000, 32'h3800000, 3);
    area(8'h01, 32'h3800000, 32'h4000000, 7);
    probe(8'h01, 32'h4000000, 1, 0, 1);
    for (int d = 0; d < 16; d++) begin
      probe(8'h05, {8'hA5, 4'(d), 20'h12345}, 1, 0, d > 12);
      checks++;
      if (io_dev != 4'(d) || (d <= 12 && io_sel != (13'b1 << d)) || (d > 12 && io_sel != 0)) begin
        failures++; $display("FAIL io device %0d sel=%b", d, io_sel);
      end
    end
    probe(8'h0A, 32'h1234_5678, 0, 0, 0);
    probe(8'h0B, 32'hFFFF_FFFF, 0, 0, 0);
    probe(8'h08, 32'h0000_0000, 0, 0, 0);
    probe(8'h04, 32'h0000_0000, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

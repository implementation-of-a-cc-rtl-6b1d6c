// dram_model: behavioural model of the DRAM bank and its DRAM/ECC
// controller chip, as seen by the memory/directory controller.
//
// Sparse word memory (unwritten words read as zero).  A request held on
// mem_req is served LAT clocks after it appears: the word is read or
// written and mem_ack pulses for one clock with the read data.  Refresh,
// ECC and row/column timing are the controller chip's business and are not
// modelled.  peek/poke give testbenches direct access.
module dram_model #(
  parameter int unsigned AW  = 24,
  parameter int unsigned LAT = 2
) (
  input  logic          clk,
  input  logic          mem_req,
  input  logic          mem_we,
  input  logic [AW-1:0] mem_addr,
  input  logic [31:0]   mem_wdata,
  output logic          mem_ack,
  output logic [31:0]   mem_rdata
);
  logic [31:0] mem [logic [AW-1:0]];
  int unsigned cnt = 0;

  initial begin
    mem_ack   = 1'b0;
    mem_rdata = '0;
  end

  function automatic logic [31:0] peek(logic [AW-1:0] a);
    return mem.exists(a) ? mem[a] : 32'h0;
  endfunction

  function automatic void poke(logic [AW-1:0] a, logic [31:0] d);
    mem[a] = d;
  endfunction

  always @(posedge clk) begin
    if (mem_req && !mem_ack) begin
      if (cnt >= LAT) begin
        cnt       <= 0;
        mem_ack   <= 1'b1;
        mem_rdata <= peek(mem_addr);
        if (mem_we) mem[mem_addr] = mem_wdata;
      end else begin
        cnt     <= cnt + 1;
        mem_ack <= 1'b0;
      end
    end else begin
      mem_ack <= 1'b0;
    end
  end
endmodule

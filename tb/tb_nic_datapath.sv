// tb_nic_datapath: all source/destination pairs with and without xfer;
// checks that the destination FIFO gets the source's word, that only the
// source is popped and only the destination written, and that a transfer
// back to its own port moves nothing.
module tb_nic_datapath;
  logic [2:0][31:0] in_data, out_data;
  logic [1:0] src, dst;
  logic xfer;
  logic [2:0] in_rd, out_wr;
  int checks = 0, failures = 0;

  nic_datapath #(.W(32)) dut (.*);

  initial begin
    for (int n = 0; n < 50; n++) begin
      for (int s = 0; s < 3; s++) for (int d = 0; d < 3; d++) for (int x = 0; x < 2; x++) begin
        for (int p = 0; p < 3; p++) in_data[p] = $urandom;
        src = 2'(s); dst = 2'(d); xfer = x[0];
        #1;
        checks++;
        if (x == 1 && s != d) begin
          if (out_wr != (3'b1 << d) || in_rd != (3'b1 << s) || out_data[d] != in_data[s]) begin
            failures++;
            $display("FAIL s=%0d d=%0d wr=%b rd=%b", s, d, out_wr, in_rd);
          end
        end else if (out_wr != 0 || in_rd != 0) begin
          failures++;
          $display("FAIL idle s=%0d d=%0d x=%0d wr=%b rd=%b", s, d, x, out_wr, in_rd);
        end
      end
    end
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

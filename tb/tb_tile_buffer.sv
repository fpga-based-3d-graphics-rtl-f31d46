// tb_tile_buffer: self-checking test of one 32x32 tile buffer. It writes
// every entry with a random colour and depth, reads them all back checking
// the one-cycle read latency, then rewrites random entries while reading
// others and checks read-old-data for a read of the entry being written.
module tb_tile_buffer;
  import hybris_pkg::*;
  logic clk = 0;
  logic we;
  logic [9:0] waddr, raddr;
  tpix_t wdata, rdata;
  tpix_t model [1024];
  int checks = 0, failures = 0;

  tile_buffer dut (.*);
  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      we = 1; waddr = 10'(i); wdata = tpix_t'({$urandom, $urandom});
      model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 1024; i++) begin
      raddr = 10'(i);
      @(negedge clk);
      checks++;
      if (rdata != model[i]) failures++;
    end
    for (int n = 0; n < 500; n++) begin
      we = 1; waddr = 10'($urandom); wdata = tpix_t'({$urandom, $urandom});
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 10'($urandom);
      @(negedge clk);
      checks++;
      if (rdata != model[raddr]) failures++;
      model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

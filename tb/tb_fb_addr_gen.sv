// tb_fb_addr_gen: self-checking test of the tiled framebuffer address
// calculation, against the formula for 640x480 (20 tiles per row), over
// the corners of the screen, tile boundaries and random pixels.
module tb_fb_addr_gen;
  import hybris_pkg::*;
  import hybris_ref_pkg::*;
  logic [10:0] x, y;
  logic [SRAM_AW-1:0] base, addr;
  int checks = 0, failures = 0;

  fb_addr_gen dut (.*);

  task automatic check(int xx, int yy, int bb);
    x = 11'(xx); y = 11'(yy); base = SRAM_AW'(bb);
    #1;
    checks++;
    if (int'(addr) != ref_fb_addr(xx, yy, 20) + bb) begin
      failures++;
      $display("addr(%0d,%0d) = %0d", xx, yy, addr);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0); check(31, 0, 0); check(32, 0, 0); check(0, 1, 0);
    check(0, 32, 0); check(639, 479, 0); check(33, 33, 0);
    for (int n = 0; n < 500; n++)
      check(int'($urandom_range(0, 639)), int'($urandom_range(0, 479)),
            ($urandom_range(0, 1) == 1) ? 4096 : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fb_xbar: self-checking test of the framebuffer crossbar with two SRAM
// bank models. In each switch position the render side writes words into
// its bank while the display side reads words from the other; the test
// checks the bank contents, the read data, the enables and that only the
// written bank's tristate drivers are on.
module tb_fb_xbar;
  import hybris_pkg::*;
  logic sel, r_we;
  logic [SRAM_AW-1:0] r_addr, d_addr;
  logic [WORD_W-1:0] r_wdata, d_rdata;
  logic [SRAM_AW-1:0] fb_addr [2];
  logic fb_we_n [2], fb_oe_n [2], fb_dq_oe [2];
  logic [WORD_W-1:0] fb_dq_o [2], fb_dq_i [2];
  logic [WORD_W-1:0] mem [2][256];
  logic clk = 0;
  int checks = 0, failures = 0;

  fb_xbar dut (.*);
  always #5 clk = !clk;

  // SRAM models: write on the clock while we_n is low, read when oe_n is low.
  for (genvar b = 0; b < 2; b++) begin : g_mem
    always_ff @(posedge clk)
      if (!fb_we_n[b] && fb_dq_oe[b]) mem[b][fb_addr[b][7:0]] <= fb_dq_o[b];
    assign fb_dq_i[b] = fb_oe_n[b] ? '0 : mem[b][fb_addr[b][7:0]];
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < 256; i++) mem[b][i] = WORD_W'(b * 1000 + i);
    r_we = 0; r_addr = 0; r_wdata = 0; d_addr = 0;
    for (int s = 0; s < 2; s++) begin
      sel = s[0];
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        r_we = 1; r_addr = SRAM_AW'(i); r_wdata = WORD_W'($urandom);
        d_addr = SRAM_AW'(i + 100);
        #1;
        checks++;
        if (d_rdata != mem[1 - s][i + 100]) failures++;
        checks++;
        if (fb_dq_oe[s] != 1 || fb_dq_oe[1 - s] != 0 || fb_oe_n[1 - s] != 0 || fb_we_n[1 - s] != 1)
          failures++;
        @(posedge clk); #1;
        checks++;
        if (mem[s][i] != r_wdata) failures++;
      end
      r_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

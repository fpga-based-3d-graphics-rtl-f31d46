// tb_input_mux: self-checking test of the input bank multiplexer. Two bank
// models hold different data. The test announces banks as full in various
// orders and checks bank_free, rd_avail, which bank answers reads, which
// bank's output enable is on, and that each rd_done moves reading to the
// other bank and frees the finished one.
module tb_input_mux;
  import hybris_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] host_full, bank_free;
  logic rd_avail, rd_done;
  logic [SRAM_AW-1:0] rd_addr;
  logic [WORD_W-1:0] rd_data;
  logic [SRAM_AW-1:0] bank_addr [2];
  logic bank_oe_n [2];
  logic [WORD_W-1:0] bank_dq [2];
  int checks = 0, failures = 0;

  input_mux dut (.*);
  always #5 clk = !clk;
  for (genvar b = 0; b < 2; b++) begin : g_bank
    assign bank_dq[b] = {16'(b + 1), 16'(bank_addr[b])};
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_read(int b);
    for (int i = 0; i < 4; i++) begin
      rd_addr = SRAM_AW'($urandom);
      #1;
      checks++;
      if (!rd_avail || rd_data != {16'(b + 1), 16'(rd_addr)} || bank_oe_n[b] != 0 || bank_oe_n[1 - b] != 1) begin
        failures++;
        $display("read from bank %0d failed", b);
      end
      @(negedge clk);
    end
  endtask

  task automatic done();
    rd_done = 1; @(negedge clk); rd_done = 0;
  endtask

  initial begin
    host_full = 0; rd_done = 0; rd_addr = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    checks++; if (bank_free != 2'b11 || rd_avail) failures++;
    // bank 1 filled first: reading must still wait for bank 0
    host_full = 2'b10; @(negedge clk); host_full = 0;
    checks++; if (bank_free != 2'b01 || rd_avail) failures++;
    host_full = 2'b01; @(negedge clk); host_full = 0;
    checks++; if (bank_free != 2'b00) failures++;
    expect_read(0);
    done();
    checks++; if (bank_free != 2'b01) failures++;
    expect_read(1);
    // host refills bank 0 while bank 1 is being read
    host_full = 2'b01; @(negedge clk); host_full = 0;
    expect_read(1);
    done();
    checks++; if (bank_free != 2'b10) failures++;
    expect_read(0);
    done();
    checks++; if (bank_free != 2'b11 || rd_avail) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

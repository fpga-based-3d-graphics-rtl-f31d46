// tb_tile_xbar: self-checking test of the tile buffer crossbar. For both
// switch positions and random port values it checks that each user's
// write and read signals reach the buffer the switch assigns it, and that
// each user gets that buffer's read data.
module tb_tile_xbar;
  import hybris_pkg::*;
  logic sel, d_we, o_we;
  logic [9:0] d_waddr, d_raddr, o_waddr, o_raddr;
  tpix_t d_wdata, d_rdata, o_wdata, o_rdata;
  logic b_we [2];
  logic [9:0] b_waddr [2], b_raddr [2];
  tpix_t b_wdata [2], b_rdata [2];
  int checks = 0, failures = 0;

  tile_xbar dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      int db, ob;
      sel = n[0];
      d_we = 1'($urandom); o_we = 1'($urandom);
      d_waddr = 10'($urandom); d_raddr = 10'($urandom);
      o_waddr = 10'($urandom); o_raddr = 10'($urandom);
      d_wdata = tpix_t'({$urandom, $urandom}); o_wdata = tpix_t'({$urandom, $urandom});
      b_rdata[0] = tpix_t'({$urandom, $urandom}); b_rdata[1] = tpix_t'({$urandom, $urandom});
      #1;
      db = sel ? 1 : 0;  ob = 1 - db;
      checks++;
      if (b_we[db] != d_we || b_waddr[db] != d_waddr || b_wdata[db] != d_wdata || b_raddr[db] != d_raddr)
        failures++;
      checks++;
      if (b_we[ob] != o_we || b_waddr[ob] != o_waddr || b_wdata[ob] != o_wdata || b_raddr[ob] != o_raddr)
        failures++;
      checks++;
      if (d_rdata != b_rdata[db] || o_rdata != b_rdata[ob]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

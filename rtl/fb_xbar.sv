// fb_xbar: 2x2 crossbar switch between the two processors and the two
// external framebuffer SRAM banks, with the control of the tristate I/O
// buffers of the SRAM data pins. With sel=0 the output tile controller
// (render side) owns bank 0 and the VGA display processor (display side)
// reads bank 1; with sel=1 the banks are exchanged. Switching is possible
// at any time; the owner of sel (fb_swap_ctrl) changes it only while the
// render side is idle.
//
// The render side only writes and the display side only reads. Per bank
// the pins are: address, active-low write and output enables, and the data
// bus split into dq_o (driven by the FPGA), dq_oe (1 = the FPGA's tristate
// output buffers drive the bus) and dq_i (read back through the input
// buffers). The tristate pad itself belongs to the FPGA I/O cell. The
// render side writes with one-cycle active-low write strobes on an
// asynchronous SRAM; the display side keeps its bank's output enable low
// and takes the data combinationally from dq_i. Each side is registered in
// its own clock domain; this module is combinational and works in both.
module fb_xbar
  import hybris_pkg::*;
(
  input  logic                sel,
  // render side (output tile controller)
  input  logic                r_we,
  input  logic [SRAM_AW-1:0]  r_addr,
  input  logic [WORD_W-1:0]   r_wdata,
  // display side (VGA display processor)
  input  logic [SRAM_AW-1:0]  d_addr,
  output logic [WORD_W-1:0]   d_rdata,
  // SRAM banks
  output logic [SRAM_AW-1:0]  fb_addr  [2],
  output logic                fb_we_n  [2],
  output logic                fb_oe_n  [2],
  output logic [WORD_W-1:0]   fb_dq_o  [2],
  output logic                fb_dq_oe [2],
  input  logic [WORD_W-1:0]   fb_dq_i  [2]
);
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      if (sel == b[0]) begin          // render bank: write
        fb_addr[b]  = r_addr;
        fb_we_n[b]  = !r_we;
        fb_oe_n[b]  = 1'b1;
        fb_dq_o[b]  = r_wdata;
        fb_dq_oe[b] = 1'b1;
      end else begin                  // display bank: read
        fb_addr[b]  = d_addr;
        fb_we_n[b]  = 1'b1;
        fb_oe_n[b]  = 1'b0;
        fb_dq_o[b]  = '0;
        fb_dq_oe[b] = 1'b0;
      end
    end
    d_rdata = sel ? fb_dq_i[0] : fb_dq_i[1];
  end
endmodule

// input_mux: the buffer-swapping input multiplexer in front of the input
// triangle controller. Two external SRAM banks act as one very large input
// FIFO: the host fills one bank over the PCI bus while the FPGA reads
// triangles from the other, so PCI transfers and tile rendering overlap.
//
// Control/status with the host side: host_full[b] is a one-clock pulse when
// the host has finished writing bank b; bank_free[b] tells the host that
// bank b is empty and may be written. The multiplexer reads the banks in
// turn, starting with bank 0: the controller side sees rd_avail while the
// current bank is full, and its address goes to that bank with the bank's
// active-low output enable asserted; the other bank's address pins are
// parked at zero and its output enable is high. A one-clock rd_done pulse
// from the controller marks the current bank empty and moves to the other
// bank. Reading is asynchronous SRAM style: the data for the address on
// the pins is sampled by the controller at the next clock edge. The two
// banks, the swapping and the control/status link follow the design
// description; the pulse protocol is this design's choice.
module input_mux
  import hybris_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  // host control / status
  input  logic [1:0]         host_full,
  output logic [1:0]         bank_free,
  // input triangle controller
  output logic               rd_avail,
  input  logic [SRAM_AW-1:0] rd_addr,
  output logic [WORD_W-1:0]  rd_data,
  input  logic               rd_done,
  // external SRAM input banks
  output logic [SRAM_AW-1:0] bank_addr [2],
  output logic               bank_oe_n [2],
  input  logic [WORD_W-1:0]  bank_dq   [2]
);
  logic [1:0] full;
  logic       cur;

  always_ff @(posedge clk) begin
    if (rst) begin
      full <= '0;
      cur  <= 1'b0;
    end else begin
      for (int b = 0; b < 2; b++) begin
        if (rd_done && cur == b[0]) full[b] <= 1'b0;
        else if (host_full[b])      full[b] <= 1'b1;
      end
      if (rd_done) cur <= !cur;
    end
  end

  assign bank_free = ~full;
  assign rd_avail  = full[cur];
  assign rd_data   = cur ? bank_dq[1] : bank_dq[0];

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      bank_addr[b] = (cur == b[0]) ? rd_addr : '0;
      bank_oe_n[b] = !(cur == b[0] && full[b]);
    end
  end

  // The controller may only finish a bank it is reading.
  assert property (@(posedge clk) disable iff (rst) rd_done |-> rd_avail);
endmodule

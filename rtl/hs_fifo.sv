// hs_fifo: valid/ready FIFO placed between the stages of the tile rendering
// pipeline. The design description reduces these FIFOs to a depth of one,
// which is the default here; DEPTH may be raised. The data is an opaque
// W-bit vector (the stages pass packed structs through it).
//
// Interface: in_valid/in_ready/in_data on the write side, out_valid/
// out_ready/out_data on the read side; a word moves when valid and ready
// are both high at a rising clock edge. in_ready is high while the FIFO is
// not full, out_valid while it is not empty. With DEPTH=1 a word written in
// one cycle is visible on the output in the next; a full one-deep FIFO
// accepts nothing in the cycle it is read (no flow-through), so a stream
// through it moves one word every two cycles. Synchronous active-high reset
// empties it.
module hs_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [PW:0]   count;
  logic          push, pop;

  assign in_ready  = (count != (PW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rp];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PW-1:0] nxt(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= nxt(wp);
      if (pop)  rp <= nxt(rp);
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk)
    if (push) mem[wp] <= in_data;

  // Handshake rules: no write into a full FIFO, no read from an empty one.
  assert property (@(posedge clk) disable iff (rst) push |-> count < (PW+1)'(DEPTH));
  assert property (@(posedge clk) disable iff (rst) pop  |-> count > 0);
endmodule

// tb_input_tri_ctrl: self-checking test of the input triangle controller.
// A bank image holds several tiles (one with no triangles, one marked as
// the last of the frame) and an end-of-bank header. The controller's
// output stream, taken with random back-pressure, must be exactly the
// triangles of each tile in order, each tile closed by an end marker with
// its position and frame flag, and rd_done must pulse once at the end.
// The bank is then refilled and read a second time.
module tb_input_tri_ctrl;
  import hybris_pkg::*;
  import hybris_ref_pkg::*;
  logic clk = 0, rst = 1;
  logic rd_avail, rd_done, tri_valid, tri_ready;
  logic [SRAM_AW-1:0] rd_addr;
  logic [WORD_W-1:0] rd_data;
  tri_item_t tri_data;
  logic [31:0] mem [1 << 19];
  tri_item_t exp_q [$];
  int checks = 0, failures = 0, dones = 0;

  input_tri_ctrl dut (.*);
  always #5 clk = !clk;
  assign rd_data = mem[rd_addr];

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) begin
    if (!rst) begin
      if (rd_done) dones <= dones + 1;
      if (tri_valid && tri_ready) begin
        checks++;
        if (exp_q.size() == 0 || tri_data.is_end != exp_q[0].is_end || tri_data.tile != exp_q[0].tile
            || (!tri_data.is_end && tri_data != exp_q[0])) begin
          failures++;
          $display("item mismatch: got %h exp %h", tri_data, exp_q[0]);
        end
        if (exp_q.size() != 0) void'(exp_q.pop_front());
      end
    end else begin
      dones <= 0;
    end
  end

  always @(negedge clk) tri_ready <= ($urandom_range(0, 2) != 0);

  task automatic fill();
    int a;
    a = 0;
    for (int t = 0; t < 4; t++) begin
      hybris_ref_pkg::rtri_t q[$];
      int tx, ty, nt;
      tx = int'($urandom_range(0, 19)); ty = int'($urandom_range(0, 14));
      nt = (t == 1) ? 0 : int'($urandom_range(1, 5));
      for (int i = 0; i < nt; i++) begin
        q.push_back(rand_tri(tx, ty));
        exp_q.push_back(to_item(q[i], tx, ty, 0, t == 3));
      end
      a = put_tile(mem, a, tx, ty, t == 3, q);
      exp_q.push_back(to_item(q.size() ? q[0] : rand_tri(0, 0), tx, ty, 1, t == 3));
    end
    put_end(mem, a);
  endtask

  initial begin
    rd_avail = 0;
    for (int i = 0; i < (1 << 19); i++) mem[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int pass = 0; pass < 2; pass++) begin
      fill();
      rd_avail = 1;
      while (!rd_done) @(negedge clk);
      rd_avail = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (exp_q.size() != 0) begin failures++; $display("%0d items missing", exp_q.size()); exp_q = {}; end
      checks++;
      if (dones != pass + 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hs_fifo: self-checking test of the depth-one stage FIFO. A random
// producer and a random consumer move 400 words through it; the consumer
// checks order and data against a queue. It also checks that the FIFO
// refuses a second word while full, and that a word written in one cycle
// is readable in the next.
module tb_hs_fifo;
  localparam int W = 16;
  logic clk = 0, rst = 1;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int sent = 0, got = 0, full_seen = 0;

  hs_fifo #(.W(W)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) begin
    if (!rst) begin
      if (in_valid && in_ready) q.push_back(in_data);
      if (out_valid && out_ready) begin
        checks++;
        if (q.size() == 0 || q[0] != out_data) begin
          failures++;
          $display("mismatch got %h", out_data);
        end
        if (q.size() != 0) void'(q.pop_front());
        got++;
      end
    end
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    // directed: fill, check full, check latency
    @(negedge clk);
    checks++; if (in_ready !== 1 || out_valid !== 0) failures++;
    in_valid = 1; in_data = 16'hA5A5;
    @(negedge clk);
    in_valid = 0;
    checks++; if (out_valid !== 1 || out_data !== 16'hA5A5) failures++;
    checks++; if (in_ready !== 0) failures++;
    full_seen++;
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
    checks++; if (out_valid !== 0) failures++;
    // random traffic
    while (sent < 400) begin
      in_valid  = ($urandom_range(0, 3) != 0);
      in_data   = W'($urandom);
      out_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (in_valid && in_ready) sent++;
      if (!in_ready) full_seen++;
      @(negedge clk);
    end
    in_valid = 0; out_ready = 1;
    repeat (5) @(negedge clk);
    checks++; if (got != sent + 1) begin failures++; $display("count %0d %0d", got, sent); end
    checks++; if (full_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

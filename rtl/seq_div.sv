// seq_div: sequential signed divider used by triangle setup for the depth
// gradients. Restoring division on the magnitudes, K quotient bits per
// clock (K restoring steps chained in one clock), then the sign is applied,
// so the quotient is truncated toward zero like the SystemVerilog '/'
// operator. W must be a multiple of K. start (one clock) latches the
// operands; done pulses W/K+1 clocks later with quo valid, and quo holds
// until the next start. A zero divisor gives quotient 0 (the caller never
// divides by zero). The algorithm and K are this design's choices.
module seq_div #(
  parameter int W = 56,
  parameter int K = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic signed [W-1:0] num,
  input  logic signed [W-1:0] den,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] quo
);
  localparam int STEPS = W / K;
  localparam int CW    = $clog2(STEPS + 1);

  logic [W-1:0]  n, q;
  logic [W:0]    r;
  logic [W-1:0]  d;
  logic          neg;
  logic [CW-1:0] cnt;
  logic [W:0]    r_nx;
  logic [W-1:0]  n_nx, q_nx;

  // K restoring steps
  always_comb begin
    logic [W:0] r_sh;
    r_nx = r;
    n_nx = n;
    q_nx = q;
    for (int i = 0; i < K; i++) begin
      r_sh = {r_nx[W-1:0], n_nx[W-1]};
      n_nx = n_nx << 1;
      if (r_sh >= {1'b0, d}) begin
        r_nx = r_sh - {1'b0, d};
        q_nx = {q_nx[W-2:0], 1'b1};
      end else begin
        r_nx = r_sh;
        q_nx = {q_nx[W-2:0], 1'b0};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      quo  <= '0;
      n    <= '0;
      q    <= '0;
      r    <= '0;
      d    <= '0;
      neg  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        n    <= num[W-1] ? W'(-num) : W'(num);
        d    <= den[W-1] ? W'(-den) : W'(den);
        neg  <= num[W-1] ^ den[W-1];
        r    <= '0;
        q    <= '0;
        cnt  <= CW'(STEPS);
        busy <= 1'b1;
      end else if (busy) begin
        if (cnt == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
          quo  <= (d == '0) ? '0 : (neg ? -$signed(q) : $signed(q));
        end else begin
          n   <= n_nx;
          r   <= r_nx;
          q   <= q_nx;
          cnt <= cnt - 1'b1;
        end
      end
    end
  end
endmodule

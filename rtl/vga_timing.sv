// vga_timing: raster counters and sync pulses for a VGA monitor. The
// defaults are the 640x480, 60 Hz mode of the design description: a 25.175
// MHz pixel clock, 800 pixel clocks per line of which 640 are visible and 95
// form the hsync pulse, and 525 lines per frame of which 480 are visible and
// 2 form the vsync pulse. The split of the remaining blanking into front
// and back porch (16/49 pixels, 10/33 lines) and the negative sync polarity
// are the usual VGA values, not given by the description.
//
// Outputs, all registered and aligned to the same pixel: hcnt/vcnt (the
// pixel position, visible when below H_VIS/V_VIS), active, hsync_n,
// vsync_n, and vblank, a one-clock pulse on the first pixel of the first
// blank line. After reset the counters start at pixel (0,0).
module vga_timing #(
  parameter int H_VIS   = 640,
  parameter int H_FP    = 16,
  parameter int H_SYNC  = 95,
  parameter int H_TOTAL = 800,
  parameter int V_VIS   = 480,
  parameter int V_FP    = 10,
  parameter int V_SYNC  = 2,
  parameter int V_TOTAL = 525,
  parameter int HW      = 11,
  parameter int VW      = 11
) (
  input  logic          clk,
  input  logic          rst,
  output logic [HW-1:0] hcnt,
  output logic [VW-1:0] vcnt,
  output logic          active,
  output logic          hsync_n,
  output logic          vsync_n,
  output logic          vblank
);
  logic [HW-1:0] hn;
  logic [VW-1:0] vn;

  always_comb begin
    hn = hcnt + 1'b1;
    vn = vcnt;
    if (hcnt == HW'(H_TOTAL - 1)) begin
      hn = '0;
      vn = (vcnt == VW'(V_TOTAL - 1)) ? '0 : vcnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcnt    <= '0;
      vcnt    <= '0;
      active  <= 1'b1;
      hsync_n <= 1'b1;
      vsync_n <= 1'b1;
      vblank  <= 1'b0;
    end else begin
      hcnt    <= hn;
      vcnt    <= vn;
      active  <= (hn < HW'(H_VIS)) && (vn < VW'(V_VIS));
      hsync_n <= !((hn >= HW'(H_VIS + H_FP)) && (hn < HW'(H_VIS + H_FP + H_SYNC)));
      vsync_n <= !((vn >= VW'(V_VIS + V_FP)) && (vn < VW'(V_VIS + V_FP + V_SYNC)));
      vblank  <= (hn == '0) && (vn == VW'(V_VIS));
    end
  end
endmodule

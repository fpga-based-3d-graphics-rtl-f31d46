// fb_swap_ctrl: exchanges the two framebuffer banks between the renderer
// and the display, across the two clock domains. The framebuffer is double
// buffered: the renderer fills one bank while the display reads the other.
// When the renderer has written the last tile of a frame it pulses swap_req
// (render clock). The request crosses to the pixel clock as a toggle through
// a two-flop synchronizer; at the next start of vertical blanking (vblank
// pulse, pixel clock) the bank select flips, and an acknowledge toggle goes
// back the same way. swap_done pulses in the render clock once the swap has
// taken effect; swap_busy is high from the request until then. sel is a
// pixel-domain register; the render side reads it only while it waits for
// swap_done, so it never sees it change during a write. Swapping at
// vertical blanking avoids a torn picture; that timing, the toggle
// handshake and the reset values are this design's choices.
module fb_swap_ctrl (
  input  logic clk,        // render clock
  input  logic rst,
  input  logic swap_req,   // pulse, render clock
  output logic swap_busy,
  output logic swap_done,  // pulse, render clock
  input  logic pix_clk,
  input  logic pix_rst,
  input  logic vblank,     // pulse at the start of vertical blanking
  output logic sel         // bank select, pixel clock
);
  // render domain
  logic req_t, ack_s1, ack_s2, ack_s3;
  // pixel domain
  logic req_s1, req_s2, ack_t;

  always_ff @(posedge clk) begin
    if (rst) begin
      req_t  <= 1'b0;
      ack_s1 <= 1'b0;
      ack_s2 <= 1'b0;
      ack_s3 <= 1'b0;
    end else begin
      if (swap_req && !swap_busy) req_t <= !req_t;
      ack_s1 <= ack_t;
      ack_s2 <= ack_s1;
      ack_s3 <= ack_s2;
    end
  end
  assign swap_busy = (req_t != ack_s2);
  assign swap_done = (ack_s2 != ack_s3);

  always_ff @(posedge pix_clk) begin
    if (pix_rst) begin
      req_s1 <= 1'b0;
      req_s2 <= 1'b0;
      ack_t  <= 1'b0;
      sel    <= 1'b0;
    end else begin
      req_s1 <= req_t;
      req_s2 <= req_s1;
      if (req_s2 != ack_t && vblank) begin
        sel   <= !sel;
        ack_t <= !ack_t;
      end
    end
  end
endmodule

// output_tile_ctrl: the output tile controller. It owns the switch of the
// tile buffer crossbar (tile_xbar): the drawing stage renders into one tile
// buffer while this controller copies the previous tile from the other
// buffer to the external framebuffer and clears it, so rendering and
// output overlap (double buffering).
//
// After reset the contents of both block RAMs are unknown, so it first
// clears the buffer on its side, flips the switch and clears the other one;
// only then does buf_ok tell the drawing stage to start. When the drawing
// stage offers a finished tile (tile_valid) and this controller is idle, it
// flips the switch and acknowledges (tile_ready) in the same clock. It then
// reads the 1024 pixels of the tile, one per clock, writes each colour to
// the framebuffer word of that pixel (tiled address, fb_addr_gen), and
// writes the cleared value (depth all ones, colour bg_color) back into the
// tile buffer one clock behind the read; both data outputs are plain wires
// (the clear word from bg_color and a constant depth, the framebuffer word
// from the read colour). A copy takes 1026 clocks. If the
// tile was the last of a frame, it then requests the framebuffer bank swap
// and waits for swap_done before it takes the next tile.
//
// The switch, the double buffering and the copy to the framebuffer follow
// the design description; clearing by writing, the clear values and the
// timing are this design's choices.
module output_tile_ctrl
  import hybris_pkg::*;
#(
  parameter int H_TILES = 20,
  parameter int AW      = $clog2(TILE_PIX)
) (
  input  logic               clk,
  input  logic               rst,
  input  color_t             bg_color,
  // drawing stage
  output logic               buf_ok,
  input  logic               tile_valid,
  output logic               tile_ready,
  input  tile_info_t         tile_info,
  // tile buffer crossbar
  output logic               sel,
  output logic               o_we,
  output logic [AW-1:0]      o_waddr,
  output tpix_t              o_wdata,
  output logic [AW-1:0]      o_raddr,
  input  tpix_t              o_rdata,
  // framebuffer (render side of fb_xbar)
  output logic               fb_we,
  output logic [SRAM_AW-1:0] fb_addr,
  output logic [WORD_W-1:0]  fb_wdata,
  // framebuffer bank swap
  output logic               swap_req,
  input  logic               swap_done
);
  typedef enum logic [2:0] {S_CLR0, S_CLR1, S_IDLE, S_COPY, S_SWAP, S_WAIT} state_t;
  state_t     state;
  logic [AW:0] idx;          // read index, AW+1 bits to count past the end
  logic       rd_v;          // a read was issued last clock
  logic [AW-1:0] rd_i;       // its index
  tile_info_t tile;
  logic [SRAM_AW-1:0] pix_addr;
  logic       copying;

  assign copying = (state == S_COPY);

  fb_addr_gen #(.H_TILES(H_TILES), .XW(TILE_ID_W + TILE_LG), .YW(TILE_ID_W + TILE_LG)) u_addr (
    .x({tile.tx, rd_i[TILE_LG-1:0]}),
    .y({tile.ty, rd_i[2*TILE_LG-1:TILE_LG]}),
    .base('0),
    .addr(pix_addr)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_CLR0;
      sel      <= 1'b0;
      idx      <= '0;
      rd_v     <= 1'b0;
      rd_i     <= '0;
      tile     <= '0;
      swap_req <= 1'b0;
    end else begin
      swap_req <= 1'b0;
      rd_v     <= 1'b0;
      case (state)
        S_CLR0, S_CLR1: begin
          idx <= idx + 1'b1;
          if (idx == (AW+1)'(TILE_PIX - 1)) begin
            idx   <= '0;
            sel   <= !sel;
            state <= (state == S_CLR0) ? S_CLR1 : S_IDLE;
          end
        end
        S_IDLE: if (tile_valid) begin
          sel   <= !sel;
          tile  <= tile_info;
          idx   <= '0;
          state <= S_COPY;
        end
        S_COPY: begin
          if (idx < (AW+1)'(TILE_PIX)) begin
            rd_v <= 1'b1;
            rd_i <= AW'(idx);
            idx  <= idx + 1'b1;
          end else if (!rd_v) begin
            if (tile.frame_end) begin
              swap_req <= 1'b1;
              state    <= S_SWAP;
            end else begin
              state <= S_IDLE;
            end
          end
        end
        S_SWAP: state <= S_WAIT;
        S_WAIT: if (swap_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign buf_ok     = (state != S_CLR0) && (state != S_CLR1);
  assign tile_ready = (state == S_IDLE);

  always_comb begin
    o_raddr = AW'(idx);
    o_wdata = '{z: '1, color: bg_color};
    if (copying) begin
      o_we    = rd_v;
      o_waddr = rd_i;
    end else begin
      o_we    = (state == S_CLR0) || (state == S_CLR1);
      o_waddr = AW'(idx);
    end
    fb_we    = rd_v;
    fb_addr  = pix_addr;
    fb_wdata = WORD_W'(o_rdata.color);
  end
endmodule

// input_tri_ctrl: the input triangle controller. It reads the triangle
// buffers the host has placed in an input bank, one 32x32 tile at a time,
// and hands the tile engine one triangle per handshake followed by an
// end-of-tile marker that carries the tile position and the end-of-frame
// flag. The bank layout (header word per tile, 16-word triangle records,
// end-of-bank header) is defined in hybris_pkg; it is this design's choice.
//
// Operation: while rd_avail it reads a header at the current address. A
// tile header with N triangles is followed by N records; for each it reads
// the seven used words (three vertex positions, three depths, the colour),
// then offers the triangle on tri_valid/tri_data until tri_ready. After the
// N triangles it offers the end-of-tile marker. An end-of-bank header
// pulses rd_done, which hands the bank back to the host, and reading starts
// again at address 0 of the other bank. Reads follow asynchronous SRAM
// timing: an address is registered onto the pins and its data sampled at
// the next clock, one word per clock. The seven words of a record take
// seven clocks, so a triangle is ready 7 clocks after the previous one was
// taken.
module input_tri_ctrl
  import hybris_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               rd_avail,
  output logic [SRAM_AW-1:0] rd_addr,
  input  logic [WORD_W-1:0]  rd_data,
  output logic               rd_done,
  output logic               tri_valid,
  input  logic               tri_ready,
  output tri_item_t          tri_data
);
  typedef enum logic [2:0] {S_IDLE, S_HDR, S_TRI, S_SEND, S_END} state_t;

  state_t             state;
  logic [SRAM_AW-1:0] rec;      // address of the current triangle record
  logic [2:0]         widx;     // word within the record
  logic [NTRI_W-1:0]  left;     // triangles left in the tile
  tile_info_t         tile;
  logic [WORD_W-1:0]  w [7];

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      rd_addr <= '0;
      rd_done <= 1'b0;
      rec     <= '0;
      widx    <= '0;
      left    <= '0;
      tile    <= '0;
    end else begin
      rd_done <= 1'b0;
      case (state)
        S_IDLE:     if (rd_avail && !rd_done) state <= S_HDR;
        S_HDR: begin
          if (rd_data[31:30] == HDR_TILE) begin
            tile.tx        <= rd_data[TILE_ID_W-1:0];
            tile.ty        <= rd_data[2*TILE_ID_W-1:TILE_ID_W];
            tile.frame_end <= rd_data[29];
            left           <= rd_data[12 +: NTRI_W];
            rec            <= rd_addr + 1'b1;
            rd_addr        <= rd_addr + 1'b1;
            widx           <= '0;
            state          <= (rd_data[12 +: NTRI_W] == '0) ? S_END : S_TRI;
          end else begin                         // end of bank (or unknown)
            rd_done <= 1'b1;
            rd_addr <= '0;
            state   <= S_IDLE;
          end
        end
        S_TRI: begin
          w[widx] <= rd_data;
          if (widx == 3'd6) begin
            state <= S_SEND;
          end else begin
            widx    <= widx + 1'b1;
            rd_addr <= rd_addr + 1'b1;        // next word, sampled next clock
          end
        end
        S_SEND: if (tri_ready) begin
          left    <= left - 1'b1;
          rec     <= rec + SRAM_AW'(TRI_WORDS);
          rd_addr <= rec + SRAM_AW'(TRI_WORDS);
          widx    <= '0;
          state   <= (left == 1) ? S_END : S_TRI;
        end
        S_END: if (tri_ready) begin
          state <= S_HDR;                        // rd_addr already points past the tile
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  function automatic vertex_t vtx(logic [WORD_W-1:0] pos, logic [WORD_W-1:0] zw);
    vertex_t v;
    v.x = coord_t'(pos[COORD_W-1:0]);
    v.y = coord_t'(pos[16 +: COORD_W]);
    v.z = zw[Z_W-1:0];
    return v;
  endfunction

  always_comb begin
    tri_valid      = (state == S_SEND) || (state == S_END);
    tri_data.is_end = (state == S_END);
    tri_data.tile  = tile;
    tri_data.v0    = vtx(w[0], w[3]);
    tri_data.v1    = vtx(w[1], w[4]);
    tri_data.v2    = vtx(w[2], w[5]);
    tri_data.color = w[6][COLOR_W-1:0];
  end
endmodule

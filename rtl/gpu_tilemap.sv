// gpu_tilemap: background layer of the GPU.
//
// The screen is a grid of 16x16-pixel tiles. The MAP memory holds one entry
// per grid cell (bitmap index and palette index, same layout as sam_attr_t);
// the TILES memory holds the tile bitmaps, 4 bits of colour index per pixel.
// The background is rendered on the fly: the raster counters address MAP, the
// entry read addresses TILES, and the pixel's colour index comes out together
// with the palette index of its tile. Nothing is buffered.
//
// Timing: both memories are synchronous, so color_idx/palette_idx belong to
// the hcount/vcount presented two clocks earlier. With one pixel every four
// clocks this is well inside a pixel period.
//
// Coordinates are logical pixels: hcount/vcount are shifted right by
// SCALE_SHIFT (2x2 screen pixels per logical pixel by default). MAP is
// MAP_ROWS x MAP_COLS entries, row-major; 20x15 cells are visible.
// TILES word layout: 4 pixels of a tile row per word, leftmost pixel in bits
// [3:0]; word address = {bitmap_idx, row[3:0], column[3:2]}.
//
// Host port: one chip enable for the block; addr[12] selects TILES (1) or MAP
// (0). Writes take one clock, read data appears on host_rdata the clock after
// host_ce. The cascaded MAP->TILES lookup follows the original design; the word
// layouts, sizes and scaling are this design's choices.
module gpu_tilemap
  import bomberman_pkg::*;
#(
  parameter int unsigned SCALE_SHIFT = 1,
  parameter int unsigned N_TILES     = 64,
  parameter int unsigned MAP_COLS    = 32,
  parameter int unsigned MAP_ROWS    = 16
) (
  input  logic               clk,
  // raster position
  input  logic [CNT_W-1:0]   hcount,
  input  logic [CNT_W-1:0]   vcount,
  // pixel output
  output logic [COLOR_W-1:0] color_idx,
  output logic [PAL_W-1:0]   palette_idx,
  // host port
  input  logic               host_ce,
  input  logic               host_we,
  input  logic [12:0]        host_addr,
  input  logic [HOST_DW-1:0] host_wdata,
  output logic [HOST_DW-1:0] host_rdata
);

  localparam int unsigned COL_W   = $clog2(MAP_COLS);
  localparam int unsigned ROW_W   = $clog2(MAP_ROWS);
  localparam int unsigned MAP_AW  = COL_W + ROW_W;
  localparam int unsigned TIDX_W  = $clog2(N_TILES);
  localparam int unsigned TILE_AW = TIDX_W + 6;
  localparam int unsigned BMP_W   = 16;

  logic [HOST_DW-1:0] map_mem  [2**MAP_AW];
  logic [BMP_W-1:0]   tile_mem [2**TILE_AW];

  initial begin
    for (int i = 0; i < 2**MAP_AW; i++)  map_mem[i]  = '0;
    for (int i = 0; i < 2**TILE_AW; i++) tile_mem[i] = '0;
  end

  // ---------------- host port ----------------
  always_ff @(posedge clk) begin
    if (host_ce) begin
      if (host_we) begin
        if (host_addr[12]) tile_mem[host_addr[TILE_AW-1:0]] <= host_wdata[BMP_W-1:0];
        else               map_mem[host_addr[MAP_AW-1:0]]   <= host_wdata;
      end
      host_rdata <= host_addr[12] ? HOST_DW'(tile_mem[host_addr[TILE_AW-1:0]])
                                  : map_mem[host_addr[MAP_AW-1:0]];
    end
  end

  // ---------------- pixel pipeline ----------------
  logic [CNT_W-1:0]   lx, ly;
  logic [HOST_DW-1:0] map_q;
  sam_attr_t          entry;
  logic [3:0]         lx1, ly1;
  logic [1:0]         lx2;
  logic [BMP_W-1:0]   tile_q;
  logic [PAL_W-1:0]   pal2;

  assign lx    = hcount >> SCALE_SHIFT;
  assign ly    = vcount >> SCALE_SHIFT;
  assign entry = sam_attr_t'(map_q);

  always_ff @(posedge clk) begin
    // stage 1: map lookup
    map_q  <= map_mem[{ly[ROW_W+3:4], lx[COL_W+3:4]}];
    lx1    <= lx[3:0];
    ly1    <= ly[3:0];
    // stage 2: bitmap lookup
    tile_q <= tile_mem[{entry.bitmap_idx[TIDX_W-1:0], ly1, lx1[3:2]}];
    pal2   <= entry.palette_idx;
    lx2    <= lx1[1:0];
  end

  assign color_idx   = tile_q[4*lx2 +: 4];
  assign palette_idx = pal2;

endmodule

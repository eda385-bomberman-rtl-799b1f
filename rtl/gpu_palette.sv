// gpu_palette: final colour stage of the GPU.
//
// For every pixel it picks the sprite's colour and palette index, or the
// tile's where the sprite line buffer is transparent, and looks the pair up in
// the palette RAM: N_PALETTES palettes of 16 entries, each an 18-bit rgb_t
// word (6 bits per channel). The address is {palette_idx, color_idx}, so
// sprites and tiles share one set of palettes. Outside the visible area the
// output is black.
//
// Timing: inputs are taken combinationally; the palette read adds one clock
// and the RGB output register another, so rgb belongs to the inputs (and the
// active flag) of two clocks earlier.
//
// Host port: word address = {palette, colour}; writes take one clock, read
// data follows the clock after host_ce. The selection rule and the 18-bit
// 6/6/6 word follow the original design; the number of palettes and the channel order
// (R in the top bits) are this design's choices.
module gpu_palette
  import bomberman_pkg::*;
#(
  parameter int unsigned N_PALETTES = 16
) (
  input  logic               clk,
  // from the tilemap
  input  logic [COLOR_W-1:0] tile_color,
  input  logic [PAL_W-1:0]   tile_palette,
  // from the sprite handler
  input  logic [COLOR_W-1:0] spr_color,
  input  logic [PAL_W-1:0]   spr_palette,
  input  logic               spr_transparent,
  // visible area flag, aligned with the inputs
  input  logic               active,
  output rgb_t               rgb,
  // host port
  input  logic               host_ce,
  input  logic               host_we,
  input  logic [7:0]         host_addr,
  input  logic [HOST_DW-1:0] host_wdata,
  output logic [HOST_DW-1:0] host_rdata
);

  localparam int unsigned PIDX_W = $clog2(N_PALETTES);
  localparam int unsigned PAL_AW = PIDX_W + COLOR_W;

  rgb_t pal_mem [2**PAL_AW];

  initial for (int i = 0; i < 2**PAL_AW; i++) pal_mem[i] = '0;

  always_ff @(posedge clk) begin
    if (host_ce) begin
      if (host_we) pal_mem[host_addr[PAL_AW-1:0]] <= rgb_t'(host_wdata);
      host_rdata <= pal_mem[host_addr[PAL_AW-1:0]];
    end
  end

  logic [COLOR_W-1:0] sel_color;
  logic [PAL_W-1:0]   sel_palette;
  rgb_t               pal_q;
  logic               active_q;

  always_comb begin
    sel_color   = spr_transparent ? tile_color   : spr_color;
    sel_palette = spr_transparent ? tile_palette : spr_palette;
  end

  always_ff @(posedge clk) begin
    pal_q    <= pal_mem[{sel_palette[PIDX_W-1:0], sel_color}];
    active_q <= active;
    rgb      <= active_q ? pal_q : '0;
  end

endmodule

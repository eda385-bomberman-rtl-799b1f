// gpu: tile and sprite graphics processor for a 640x480 VGA screen.
//
// It decides the colour of every pixel at the moment the raster reaches it.
// The background comes from gpu_tilemap (a grid of 16x16 tiles, looked up on
// the fly), the foreground from gpu_sprite (up to N_SLOTS freely placed 16x16
// sprites, drawn one line ahead into a line buffer). gpu_palette picks the
// sprite pixel unless it is transparent and turns colour index plus palette
// index into an 18-bit RGB value. gpu_interrupt raises a vertical blank
// interrupt, and gpu_addresser maps all the memories onto one host port.
//
// Timing: hcount/vcount/active/pix_tick come from vga_timing. rgb belongs to
// the counters of four clocks earlier (two in the tile/sprite lookups, two in
// the palette), one pixel period at the 100 MHz / 25 MHz clock ratio.
// Host port: block-RAM style; read data appears the clock after host_en.
// Address map (word addresses): 0x0000 MAP, 0x1000 TILES, 0x2000 SAM,
// 0x3000 SPRITES, 0x4000 PALETTE.
//
// The block structure and the data flow between the blocks follow the original
// design; the address map and latencies are this design's choices.
module gpu
  import bomberman_pkg::*;
#(
  parameter int unsigned SCALE_SHIFT = 1,
  parameter int unsigned N_SLOTS     = 512,
  parameter int unsigned N_SPRITES   = 64,
  parameter int unsigned N_TILES     = 64,
  parameter int unsigned N_PALETTES  = 16
) (
  input  logic               clk,
  input  logic               rst,
  // raster
  input  logic [CNT_W-1:0]   hcount,
  input  logic [CNT_W-1:0]   vcount,
  input  logic               active,
  input  logic               pix_tick,
  // video out
  output rgb_t               rgb,
  output logic               irq,
  output logic               sprite_busy,
  output logic               sprite_overrun,
  // host port
  input  logic               host_en,
  input  logic               host_we,
  input  logic [GPU_AW-1:0]  host_addr,
  input  logic [HOST_DW-1:0] host_wdata,
  output logic [HOST_DW-1:0] host_rdata
);

  logic               ce_tilemap, ce_sprite, ce_palette;
  logic [HOST_DW-1:0] rd_tilemap, rd_sprite, rd_palette;
  logic [COLOR_W-1:0] tile_color, spr_color;
  logic [PAL_W-1:0]   tile_palette, spr_palette;
  logic               spr_transparent;
  logic [1:0]         active_d;

  gpu_addresser u_addresser (
    .clk, .rst,
    .host_en, .host_addr, .host_rdata,
    .ce_tilemap, .ce_sprite, .ce_palette,
    .rdata_tilemap (rd_tilemap),
    .rdata_sprite  (rd_sprite),
    .rdata_palette (rd_palette)
  );

  gpu_interrupt u_interrupt (
    .clk, .rst, .hcount, .vcount, .irq
  );

  gpu_tilemap #(
    .SCALE_SHIFT (SCALE_SHIFT),
    .N_TILES     (N_TILES)
  ) u_tilemap (
    .clk, .hcount, .vcount,
    .color_idx   (tile_color),
    .palette_idx (tile_palette),
    .host_ce     (ce_tilemap),
    .host_we,
    .host_addr   (host_addr[12:0]),
    .host_wdata,
    .host_rdata  (rd_tilemap)
  );

  gpu_sprite #(
    .SCALE_SHIFT (SCALE_SHIFT),
    .N_SLOTS     (N_SLOTS),
    .N_SPRITES   (N_SPRITES)
  ) u_sprite (
    .clk, .rst, .hcount, .vcount, .pix_tick,
    .color_idx   (spr_color),
    .palette_idx (spr_palette),
    .transparent (spr_transparent),
    .busy        (sprite_busy),
    .overrun     (sprite_overrun),
    .host_ce     (ce_sprite),
    .host_we,
    .host_addr   (host_addr[12:0]),
    .host_wdata,
    .host_rdata  (rd_sprite)
  );

  always_ff @(posedge clk) active_d <= {active_d[0], active};

  gpu_palette #(
    .N_PALETTES (N_PALETTES)
  ) u_palette (
    .clk,
    .tile_color, .tile_palette,
    .spr_color, .spr_palette, .spr_transparent,
    .active     (active_d[1]),
    .rgb,
    .host_ce    (ce_palette),
    .host_we,
    .host_addr  (host_addr[7:0]),
    .host_wdata,
    .host_rdata (rd_palette)
  );

endmodule

// gpu_addresser: host bus decoder of the GPU.
//
// The host reaches every GPU memory through one block-RAM style port
// (enable, write enable, word address, write data, read data). The top three
// address bits select the memory (gpu_region_e): MAP and TILES go to the
// tilemap, SAM and SPRITES to the sprite handler, PALETTE to the palette. The
// addresser raises the chip enable of the selected block and returns that
// block's read data. Blocks answer one clock after their enable, so the
// selection is registered with the access and steers the read-data mux on
// the next clock. Unused regions read as zero and ignore writes.
//
// Decoding memories behind one port follows the original design; the address map is
// this design's choice.
module gpu_addresser
  import bomberman_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  // host side
  input  logic               host_en,
  input  logic [GPU_AW-1:0]  host_addr,
  output logic [HOST_DW-1:0] host_rdata,
  // chip enables
  output logic               ce_tilemap,
  output logic               ce_sprite,
  output logic               ce_palette,
  // read data from the blocks
  input  logic [HOST_DW-1:0] rdata_tilemap,
  input  logic [HOST_DW-1:0] rdata_sprite,
  input  logic [HOST_DW-1:0] rdata_palette
);

  gpu_region_e region, region_q;
  logic        valid_q;

  assign region = gpu_region_e'(host_addr[GPU_AW-1 -: 3]);

  always_comb begin
    ce_tilemap = host_en && (region == REG_MAP || region == REG_TILES);
    ce_sprite  = host_en && (region == REG_SAM || region == REG_SPRITES);
    ce_palette = host_en && (region == REG_PALETTE);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      region_q <= REG_MAP;
      valid_q  <= 1'b0;
    end else if (host_en) begin
      region_q <= region;
      valid_q  <= 1'b1;
    end
  end

  always_comb begin
    host_rdata = '0;
    if (valid_q) begin
      unique case (region_q)
        REG_MAP, REG_TILES:   host_rdata = rdata_tilemap;
        REG_SAM, REG_SPRITES: host_rdata = rdata_sprite;
        REG_PALETTE:          host_rdata = rdata_palette;
        default:              host_rdata = '0;
      endcase
    end
  end

  // at most one block answers an access
  assert property (@(posedge clk) disable iff (rst)
                   $onehot0({ce_tilemap, ce_sprite, ce_palette}));

endmodule

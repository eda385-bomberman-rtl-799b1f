// bomberman_pkg: constants and word layouts shared by the video, sound and
// gamepad blocks of the Bomberman console.
//
// Video runs from a 100 MHz system clock with a pixel every CLK_DIV clocks
// (25 MHz pixel rate, 640x480 at 60 Hz). The GPU works on logical pixels that
// are 2x2 screen pixels (320x240), which lets a sprite position fit the 18-bit
// attribute word (9-bit X, 8-bit Y, enable) and a sprite line fit the
// 512-entry line buffer halves. All host-visible memories are 18 bits wide,
// matching the block RAM word width.
package bomberman_pkg;

  // ---------------- VGA 640x480 @ 60 Hz ----------------
  localparam int unsigned H_ACTIVE = 640;
  localparam int unsigned H_FP     = 16;
  localparam int unsigned H_SYNC   = 96;
  localparam int unsigned H_BP     = 48;
  localparam int unsigned H_TOTAL  = H_ACTIVE + H_FP + H_SYNC + H_BP;  // 800
  localparam int unsigned V_ACTIVE = 480;
  localparam int unsigned V_FP     = 10;
  localparam int unsigned V_SYNC   = 2;
  localparam int unsigned V_BP     = 33;
  localparam int unsigned V_TOTAL  = V_ACTIVE + V_FP + V_SYNC + V_BP;  // 525
  localparam int unsigned CNT_W    = 10;   // hcount / vcount width

  // ---------------- Host memory bus ----------------
  localparam int unsigned HOST_DW  = 18;   // data width of every memory word

  // ---------------- Graphics words ----------------
  localparam int unsigned COLOR_W  = 4;    // colour index inside a palette
  localparam int unsigned PAL_W    = 4;    // palette index (16 palettes)
  localparam int unsigned RGB_W    = 6;    // per channel

  // Colour index treated as "transparent" in sprite bitmaps.
  localparam logic [COLOR_W-1:0] TRANSPARENT_COLOR = '0;

  // First SAM word of a sprite slot.
  typedef struct packed {
    logic       enable;  // [17]
    logic [8:0] x;       // [16:8] logical X
    logic [7:0] y;       // [7:0]  logical Y
  } sam_pos_t;

  // Second SAM word of a sprite slot; also the layout of a tilemap entry
  // (flip bits unused there).
  typedef struct packed {
    logic             invy;        // [17]
    logic             invx;        // [16]
    logic [PAL_W-1:0] palette_idx; // [15:12]
    logic [11:0]      bitmap_idx;  // [11:0]
  } sam_attr_t;

  // One line buffer entry.
  typedef struct packed {
    logic               transparent; // 1 = no sprite pixel here
    logic [PAL_W-1:0]   palette_idx;
    logic [COLOR_W-1:0] color_idx;
  } lb_entry_t;

  // One palette word.
  typedef struct packed {
    logic [RGB_W-1:0] r;   // [17:12]
    logic [RGB_W-1:0] g;   // [11:6]
    logic [RGB_W-1:0] b;   // [5:0]
  } rgb_t;

  // GPU host address map (word addresses, 15 bits): bits [14:12] select the
  // memory, the low bits address inside it.
  localparam int unsigned GPU_AW = 15;
  typedef enum logic [2:0] {
    REG_MAP     = 3'd0,
    REG_TILES   = 3'd1,
    REG_SAM     = 3'd2,
    REG_SPRITES = 3'd3,
    REG_PALETTE = 3'd4
  } gpu_region_e;

endpackage

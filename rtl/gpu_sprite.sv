// gpu_sprite: sprite (foreground) layer of the GPU.
//
// Sprites are 16x16 bitmaps placed at any logical X/Y. Their attributes live
// in the Sprite Attribute Memory (SAM): N_SLOTS slots of two 18-bit words,
// word 0 = sam_pos_t {enable, x, y} and word 1 = sam_attr_t {invy, invx,
// palette_idx, bitmap_idx}. Because the work per pixel depends on how many
// sprites cover it, sprites are drawn one scan line ahead into a line buffer
// of two 512-entry halves: the display reads one half while the render FSM
// fills the other.
//
// Render FSM, started when a new logical line is about to be displayed
// (at hcount == 0 of the physical line before it):
//   CLEAR     write a transparent entry to all 512 positions of the half
//   POS_*     read word 0 of each slot; skip the slot unless it is enabled
//             and the line lies within its 16 rows
//   ATTR_*    read word 1, keep it, mirror the row when invy is set
//   PIX/DRAIN read the 16 pixels of the bitmap row (mirrored when invx is
//             set) and write each into the line buffer with the palette index
//             and the transparency bit cleared, unless its colour index is
//             TRANSPARENT_COLOR; so later slots draw over earlier ones.
// Cost: LB_W + 2*N_SLOTS clocks plus 19 clocks per sprite on the line, i.e.
// 1536 + 19*n clocks against the 3200 clocks of one physical line (up to 87
// sprites on one line). A render still running when the next physical line
// begins pulses overrun and goes on (the line may show partly drawn); a new
// start always restarts the FSM on the new line.
// X and Y positions wrap modulo 512 and 256.
//
// Display side: the line buffer is read at the logical position of
// hcount/vcount; color_idx/palette_idx/transparent belong to the counters
// presented two clocks earlier (same latency as gpu_tilemap).
//
// Host port: one chip enable; addr[12] selects the sprite bitmaps (1) or the
// SAM (0). Bitmap layout as in gpu_tilemap: 4 pixels per word, leftmost in
// bits [3:0], address {bitmap_idx, row, column[3:2]}. Read data follows the
// clock after host_ce.
//
// Slot count, SAM contents, line-ahead rendering, clear-then-iterate order,
// flips and transparent-colour skipping follow the original design. Word bit
// positions, the transparent colour (0), the 2-clock-per-slot schedule,
// wrap-around and the restart rule are this design's choices.
module gpu_sprite
  import bomberman_pkg::*;
#(
  parameter int unsigned SCALE_SHIFT = 1,
  parameter int unsigned N_SLOTS     = 512,
  parameter int unsigned N_SPRITES   = 64,
  parameter int unsigned LB_W        = 512
) (
  input  logic               clk,
  input  logic               rst,
  // raster position
  input  logic [CNT_W-1:0]   hcount,
  input  logic [CNT_W-1:0]   vcount,
  input  logic               pix_tick,
  // pixel output
  output logic [COLOR_W-1:0] color_idx,
  output logic [PAL_W-1:0]   palette_idx,
  output logic               transparent,
  // status
  output logic               busy,
  output logic               overrun,
  // host port
  input  logic               host_ce,
  input  logic               host_we,
  input  logic [12:0]        host_addr,
  input  logic [HOST_DW-1:0] host_wdata,
  output logic [HOST_DW-1:0] host_rdata
);

  localparam int unsigned SLOT_W = $clog2(N_SLOTS);
  localparam int unsigned SAM_AW = SLOT_W + 1;
  localparam int unsigned SIDX_W = $clog2(N_SPRITES);
  localparam int unsigned SPR_AW = SIDX_W + 6;
  localparam int unsigned LBX_W  = $clog2(LB_W);
  localparam int unsigned LB_AW  = LBX_W + 1;
  localparam int unsigned BMP_W  = 16;
  localparam int unsigned SMASK  = (1 << SCALE_SHIFT) - 1;

  localparam lb_entry_t LB_CLEAR = '{transparent: 1'b1, palette_idx: '0, color_idx: '0};

  logic [HOST_DW-1:0] sam_mem [2**SAM_AW];
  logic [BMP_W-1:0]   spr_mem [2**SPR_AW];
  lb_entry_t          lb_mem  [2**LB_AW];

  initial begin
    for (int i = 0; i < 2**SAM_AW; i++) sam_mem[i] = '0;
    for (int i = 0; i < 2**SPR_AW; i++) spr_mem[i] = '0;
    for (int i = 0; i < 2**LB_AW; i++)  lb_mem[i]  = LB_CLEAR;
  end

  // ---------------- host port (port A of SAM and bitmaps) ----------------
  always_ff @(posedge clk) begin
    if (host_ce) begin
      if (host_we) begin
        if (host_addr[12]) spr_mem[host_addr[SPR_AW-1:0]] <= host_wdata[BMP_W-1:0];
        else               sam_mem[host_addr[SAM_AW-1:0]] <= host_wdata;
      end
      host_rdata <= host_addr[12] ? HOST_DW'(spr_mem[host_addr[SPR_AW-1:0]])
                                  : sam_mem[host_addr[SAM_AW-1:0]];
    end
  end

  // ---------------- render FSM ----------------
  typedef enum logic [2:0] {
    S_IDLE, S_CLEAR, S_POS_REQ, S_POS_CHK, S_ATTR_REQ, S_ATTR_CHK, S_PIX, S_DRAIN
  } state_e;

  state_e             state;
  logic [LBX_W-1:0]   cnt;        // clear position / pixel counter
  logic [SLOT_W-1:0]  slot;
  logic [7:0]         line;       // logical line being rendered
  logic [3:0]         row;        // bitmap row of the current sprite
  logic [8:0]         xpos;
  sam_attr_t          attr;
  logic [HOST_DW-1:0] sam_q;
  logic [BMP_W-1:0]   spr_q;
  logic [SAM_AW-1:0]  sam_raddr;
  logic [SPR_AW-1:0]  spr_raddr;
  logic [3:0]         col;

  // pixel write pipeline (bitmap read has one clock of latency)
  logic               pend_valid;
  logic [8:0]         pend_x;
  logic [1:0]         pend_sel;

  // start condition: the next physical line begins a new logical line
  logic [CNT_W-1:0]   next_v;
  logic               start;
  logic [CNT_W-1:0]   tgt_line;

  assign next_v   = (vcount == CNT_W'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
  assign start    = pix_tick && (hcount == '0) && ((next_v & CNT_W'(SMASK)) == '0);
  assign tgt_line = next_v >> SCALE_SHIFT;

  sam_pos_t  pos;
  logic [7:0] dy;
  assign pos = sam_pos_t'(sam_q);
  assign dy  = line - pos.y;
  assign col = attr.invx ? ~cnt[3:0] : cnt[3:0];

  always_comb begin
    sam_raddr = {slot, (state == S_ATTR_REQ)};
    spr_raddr = {attr.bitmap_idx[SIDX_W-1:0], row, col[3:2]};
  end

  always_ff @(posedge clk) begin
    sam_q <= sam_mem[sam_raddr];
    spr_q <= spr_mem[spr_raddr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      cnt        <= '0;
      slot       <= '0;
      line       <= '0;
      row        <= '0;
      xpos       <= '0;
      attr       <= '0;
      pend_valid <= 1'b0;
      pend_x     <= '0;
      pend_sel   <= '0;
      overrun    <= 1'b0;
    end else begin
      // a render still running when a physical line begins is late
      overrun    <= pix_tick && (hcount == '0) && (state != S_IDLE);
      pend_valid <= (state == S_PIX);
      pend_x     <= xpos + 9'(cnt[3:0]);
      pend_sel   <= col[1:0];
      if (start) begin
        state      <= S_CLEAR;
        cnt        <= '0;
        line       <= tgt_line[7:0];
        pend_valid <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_CLEAR: begin
            cnt <= cnt + 1'b1;
            if (cnt == LBX_W'(LB_W - 1)) begin
              slot  <= '0;
              state <= S_POS_REQ;
            end
          end
          S_POS_REQ: state <= S_POS_CHK;
          S_POS_CHK: begin
            if (pos.enable && (dy < 8'd16)) begin
              row   <= dy[3:0];
              xpos  <= pos.x;
              state <= S_ATTR_REQ;
            end else if (slot == SLOT_W'(N_SLOTS - 1)) begin
              state <= S_IDLE;
            end else begin
              slot  <= slot + 1'b1;
              state <= S_POS_REQ;
            end
          end
          S_ATTR_REQ: state <= S_ATTR_CHK;
          S_ATTR_CHK: begin
            attr  <= sam_attr_t'(sam_q);
            if (sam_q[17]) row <= ~row;   // invy: mirror vertically
            cnt   <= '0;
            state <= S_PIX;
          end
          S_PIX: begin
            cnt <= cnt + 1'b1;
            if (cnt[3:0] == 4'd15) state <= S_DRAIN;
          end
          S_DRAIN: begin
            if (slot == SLOT_W'(N_SLOTS - 1)) begin
              state <= S_IDLE;
            end else begin
              slot  <= slot + 1'b1;
              state <= S_POS_REQ;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign busy = (state != S_IDLE);

  // ---------------- line buffer ----------------
  logic               lb_we;
  logic [LB_AW-1:0]   lb_waddr;
  lb_entry_t          lb_wdata;
  logic [COLOR_W-1:0] pix_color;

  assign pix_color = spr_q[4*pend_sel +: 4];

  always_comb begin
    lb_we    = 1'b0;
    lb_waddr = {line[0], cnt};
    lb_wdata = LB_CLEAR;
    if (state == S_CLEAR) begin
      lb_we = 1'b1;
    end else if (pend_valid && (pix_color != TRANSPARENT_COLOR)) begin
      lb_we    = 1'b1;
      lb_waddr = {line[0], pend_x[LBX_W-1:0]};
      lb_wdata = '{transparent: 1'b0, palette_idx: attr.palette_idx, color_idx: pix_color};
    end
  end

  always_ff @(posedge clk) begin
    if (lb_we) lb_mem[lb_waddr] <= lb_wdata;
  end

  // display read: two clocks, matching the tilemap pipeline
  logic [CNT_W-1:0] lx, ly;
  lb_entry_t        lb_q, lb_q2;
  assign lx = hcount >> SCALE_SHIFT;
  assign ly = vcount >> SCALE_SHIFT;

  always_ff @(posedge clk) begin
    lb_q  <= lb_mem[{ly[0], lx[LBX_W-1:0]}];
    lb_q2 <= lb_q;
  end

  assign color_idx   = lb_q2.color_idx;
  assign palette_idx = lb_q2.palette_idx;
  assign transparent = lb_q2.transparent;

  // clearing never touches the half that is on screen
  assert property (@(posedge clk) disable iff (rst)
                   (state == S_CLEAR && vcount < CNT_W'(V_ACTIVE)) |-> (lb_waddr[LB_AW-1] != ly[0]));

endmodule

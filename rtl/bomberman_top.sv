// bomberman_top: the custom hardware of a small SNES-style game console.
//
// A soft processor (outside this module) runs the game and reaches the
// peripherals over block-RAM style ports, one per peripheral, as presented by
// bus-to-BRAM bridges:
//   gpu             tile + sprite graphics on a 640x480 @ 60 Hz VGA screen,
//                   vertical blank interrupt on irq
//   sound_generator sample ring buffer, played through pwm on pwm_out
//   gamepad_if x4   one reader per NES pad; each pad's 8 buttons readable
// vga_timing supplies the raster counters the GPU draws by and the sync
// pulses for the monitor. The sync pulses are delayed by the GPU's four-clock
// pixel latency so that they stay aligned with the RGB output.
//
// Ports: all host ports take an enable, write enable, word address and write
// data, and return read data the clock after the enable. The processor, its
// program memory, the interrupt controller, the SPI flash with its controller
// and the bus itself are not part of this module.
//
// The set of blocks and the way they connect follow the original design;
// block-RAM style ports in place of the bus bridges and the sync delay are
// this design's choices.
module bomberman_top
  import bomberman_pkg::*;
#(
  parameter int unsigned CLK_DIV      = 4,
  parameter int unsigned SCALE_SHIFT  = 1,
  parameter int unsigned N_SLOTS      = 512,
  parameter int unsigned SAMPLE_DIV   = 2560,
  parameter int unsigned SND_WORDS    = 1024,
  parameter int unsigned PAD_HALF     = 600,
  parameter int unsigned PAD_LATCH    = 1200,
  parameter int unsigned PAD_POLL     = 1666667
) (
  input  logic               clk,
  input  logic               rst,
  // GPU host port and interrupt
  input  logic               gpu_en,
  input  logic               gpu_we,
  input  logic [GPU_AW-1:0]  gpu_addr,
  input  logic [HOST_DW-1:0] gpu_wdata,
  output logic [HOST_DW-1:0] gpu_rdata,
  output logic               irq,
  output logic               sprite_busy,
  output logic               sprite_overrun,
  // VGA
  output logic [RGB_W-1:0]   vga_r,
  output logic [RGB_W-1:0]   vga_g,
  output logic [RGB_W-1:0]   vga_b,
  output logic               vga_hsync,
  output logic               vga_vsync,
  // sound host port and output
  input  logic               snd_en,
  input  logic               snd_we,
  input  logic [$clog2(SND_WORDS)-1:0] snd_addr,
  input  logic [HOST_DW-1:0] snd_wdata,
  output logic [HOST_DW-1:0] snd_rdata,
  output logic               pwm_out,
  // gamepads
  output logic [3:0]         pad_latch,
  output logic [3:0]         pad_pulse,
  input  logic [3:0]         pad_data,
  input  logic [3:0]         pad_en,
  output logic [HOST_DW-1:0] pad_rdata [4]
);

  localparam int unsigned GPU_LAT = 4;

  logic [CNT_W-1:0] hcount, vcount;
  logic             hsync, vsync, active, pix_tick;
  rgb_t             rgb;
  logic [GPU_LAT-1:0] hs_d, vs_d;

  vga_timing #(.CLK_DIV(CLK_DIV)) u_timing (
    .clk, .rst, .hcount, .vcount, .hsync, .vsync, .active, .pix_tick
  );

  gpu #(
    .SCALE_SHIFT (SCALE_SHIFT),
    .N_SLOTS     (N_SLOTS)
  ) u_gpu (
    .clk, .rst, .hcount, .vcount, .active, .pix_tick,
    .rgb, .irq, .sprite_busy, .sprite_overrun,
    .host_en    (gpu_en),
    .host_we    (gpu_we),
    .host_addr  (gpu_addr),
    .host_wdata (gpu_wdata),
    .host_rdata (gpu_rdata)
  );

  always_ff @(posedge clk) begin
    hs_d <= {hs_d[GPU_LAT-2:0], hsync};
    vs_d <= {vs_d[GPU_LAT-2:0], vsync};
  end

  assign vga_r     = rgb.r;
  assign vga_g     = rgb.g;
  assign vga_b     = rgb.b;
  assign vga_hsync = hs_d[GPU_LAT-1];
  assign vga_vsync = vs_d[GPU_LAT-1];

  // ---------------- sound ----------------
  logic       sample_tick;
  logic [7:0] sample_data;
  logic       playing_half;

  sound_generator #(
    .SAMPLE_DIV (SAMPLE_DIV),
    .BUF_WORDS  (SND_WORDS)
  ) u_sound (
    .clk, .rst,
    .host_en    (snd_en),
    .host_we    (snd_we),
    .host_addr  (snd_addr),
    .host_wdata (snd_wdata),
    .host_rdata (snd_rdata),
    .sample_tick, .sample_data, .playing_half
  );

  pwm u_pwm (
    .clk, .rst, .sample_tick, .sample_data, .pwm_out
  );

  // ---------------- gamepads ----------------
  for (genvar p = 0; p < 4; p++) begin : g_pad
    logic [7:0] buttons;
    logic       update;
    gamepad_if #(
      .HALF_CYCLES  (PAD_HALF),
      .LATCH_CYCLES (PAD_LATCH),
      .POLL_CYCLES  (PAD_POLL)
    ) u_pad (
      .clk, .rst,
      .pad_latch  (pad_latch[p]),
      .pad_pulse  (pad_pulse[p]),
      .pad_data   (pad_data[p]),
      .buttons, .update,
      .host_en    (pad_en[p]),
      .host_rdata (pad_rdata[p])
    );
  end

endmodule

// vga_timing: horizontal/vertical counters and sync pulses for a 640x480
// 60 Hz VGA screen, run from the 100 MHz system clock.
//
// A prescaler advances the counters once every CLK_DIV clocks (25 MHz pixel
// rate with the defaults). hcount runs 0..H_TOTAL-1 and vcount 0..V_TOTAL-1;
// the visible area is hcount < H_ACTIVE and vcount < V_ACTIVE. hsync and
// vsync are the standard negative-going pulses. pix_tick is high for the one
// clock in which hcount/vcount have just taken a new value, so that logic
// running at the system clock can start work in step with the raster.
// Counters and pix_tick are registers; hsync, vsync and active are decoded
// from the counters and change in the same clock as they do.
//
// A separate timing unit that hands counters and sync to the GPU, and the
// 640x480 @ 60 Hz mode, follow the original design. The porch and sync widths
// are the common 640x480 figures and, like the 4-clock pixel, this design's
// choice; the frame rate comes out at 59.5 Hz.
module vga_timing
  import bomberman_pkg::*;
#(
  parameter int unsigned CLK_DIV = 4
) (
  input  logic             clk,
  input  logic             rst,
  output logic [CNT_W-1:0] hcount,
  output logic [CNT_W-1:0] vcount,
  output logic             hsync,    // active low
  output logic             vsync,    // active low
  output logic             active,   // inside the 640x480 visible area
  output logic             pix_tick  // counters took a new value this clock
);

  localparam int unsigned DIV_W = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  logic [DIV_W-1:0] div;
  logic             adv;

  assign adv = (div == DIV_W'(CLK_DIV - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      div      <= '0;
      hcount   <= '0;
      vcount   <= '0;
      pix_tick <= 1'b0;
    end else begin
      pix_tick <= adv;
      if (adv) begin
        div <= '0;
        if (hcount == CNT_W'(H_TOTAL - 1)) begin
          hcount <= '0;
          vcount <= (vcount == CNT_W'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
        end else begin
          hcount <= hcount + 1'b1;
        end
      end else begin
        div <= div + 1'b1;
      end
    end
  end

  always_comb begin
    hsync  = !((hcount >= CNT_W'(H_ACTIVE + H_FP)) &&
               (hcount <  CNT_W'(H_ACTIVE + H_FP + H_SYNC)));
    vsync  = !((vcount >= CNT_W'(V_ACTIVE + V_FP)) &&
               (vcount <  CNT_W'(V_ACTIVE + V_FP + V_SYNC)));
    active = (hcount < CNT_W'(H_ACTIVE)) && (vcount < CNT_W'(V_ACTIVE));
  end

endmodule

// gpu_interrupt: vertical blank interrupt of the GPU.
//
// Watches the raster counters and pulses irq for one clock when the first
// line below the visible area begins (vcount == V_ACTIVE, hcount == 0), once
// per frame (60 Hz). Software uses it to update the game state and the GPU
// memories while nothing is drawn.
//
// The interrupt source and its use at 60 Hz follow the original design; a one-clock
// pulse for an edge-sensitive interrupt controller is this design's choice.
module gpu_interrupt
  import bomberman_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [CNT_W-1:0] hcount,
  input  logic [CNT_W-1:0] vcount,
  output logic             irq
);

  logic at_vblank, at_vblank_q;

  assign at_vblank = (vcount == CNT_W'(V_ACTIVE)) && (hcount == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      at_vblank_q <= 1'b0;
      irq         <= 1'b0;
    end else begin
      at_vblank_q <= at_vblank;
      irq         <= at_vblank && !at_vblank_q;
    end
  end

endmodule

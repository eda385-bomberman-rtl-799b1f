// tb_vga_timing: checks the VGA counters against a reference raster model
// over one full frame plus a few lines: pixel prescaler, counter wrap points,
// sync pulse widths and positions, visible-area flag and pix_tick. Also
// checks the frame length (800 x 525 pixels x 4 clocks).
module tb_vga_timing;
  import bomberman_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [CNT_W-1:0] hcount, vcount;
  logic hsync, vsync, active, pix_tick;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vga_timing dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at h=%0d v=%0d", what, hcount, vcount);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_h, ref_v, phase, hs_low, vs_low_clk, act_clk, ticks, frame_clk;
  bit first_frame_done;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    ref_h = 0; ref_v = 0; phase = 0;
    hs_low = 0; vs_low_clk = 0; act_clk = 0; ticks = 0; frame_clk = 0;
    // one full frame
    for (int c = 0; c < 800*525*4; c++) begin
      @(negedge clk);
      check(hcount == CNT_W'(ref_h) && vcount == CNT_W'(ref_v), "counters");
      check(hsync == !(ref_h >= 656 && ref_h < 752), "hsync");
      check(vsync == !(ref_v >= 490 && ref_v < 492), "vsync");
      check(active == (ref_h < 640 && ref_v < 480), "active");
      check(pix_tick == (phase == 0 && c > 0), "pix_tick");
      if (!hsync && ref_v == 0) hs_low++;
      if (!vsync) vs_low_clk++;
      if (active) act_clk++;
      if (pix_tick) ticks++;
      phase++;
      if (phase == 4) begin
        phase = 0;
        ref_h++;
        if (ref_h == 800) begin ref_h = 0; ref_v = (ref_v == 524) ? 0 : ref_v + 1; end
      end
    end
    @(negedge clk);
    check(hcount == 0 && vcount == 0, "frame wraps after 1680000 clocks");
    check(hs_low == 96*4, "hsync width 96 pixels");
    check(vs_low_clk == 2*800*4, "vsync width 2 lines");
    check(act_clk == 640*480*4, "visible area 640x480");
    check(ticks == 800*525 - 1, "one pix_tick per pixel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gpu_palette: loads random colours into all 256 palette entries, reads
// some back, then drives random tile/sprite pixels and checks that rgb two
// clocks later is the palette entry of the sprite pixel, or of the tile pixel
// where the sprite is transparent, and black outside the visible area.
module tb_gpu_palette;
  import bomberman_pkg::*;

  logic clk = 1'b0;
  logic [COLOR_W-1:0] tile_color = '0, spr_color = '0;
  logic [PAL_W-1:0] tile_palette = '0, spr_palette = '0;
  logic spr_transparent = 1'b1, active = 1'b0;
  rgb_t rgb;
  logic host_ce = 1'b0, host_we = 1'b0;
  logic [7:0] host_addr = '0;
  logic [HOST_DW-1:0] host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;
  logic [17:0] pal_ref [256];

  always #5 clk = ~clk;

  gpu_palette dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int sprite_used = 0, tile_used = 0;
    for (int i = 0; i < 256; i++) begin
      pal_ref[i] = 18'($urandom);
      @(negedge clk);
      host_ce = 1; host_we = 1; host_addr = 8'(i); host_wdata = pal_ref[i];
    end
    @(negedge clk); host_ce = 0; host_we = 0;
    for (int i = 0; i < 32; i++) begin
      automatic int a = $urandom_range(0, 255);
      @(negedge clk); host_ce = 1; host_addr = 8'(a);
      @(negedge clk); host_ce = 0;
      check(host_rdata == pal_ref[a], "palette readback");
    end
    for (int i = 0; i < 2000; i++) begin
      logic [17:0] expect_rgb;
      @(negedge clk);
      tile_color = 4'($urandom); tile_palette = 4'($urandom);
      spr_color = 4'($urandom);  spr_palette = 4'($urandom);
      spr_transparent = 1'($urandom);
      active = ($urandom_range(0, 9) != 0);
      if (!active) expect_rgb = '0;
      else if (spr_transparent) begin expect_rgb = pal_ref[{tile_palette, tile_color}]; tile_used++; end
      else begin expect_rgb = pal_ref[{spr_palette, spr_color}]; sprite_used++; end
      @(posedge clk); @(posedge clk); #1;
      check(rgb == expect_rgb, "rgb");
    end
    check(sprite_used > 500 && tile_used > 500, "both sources exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

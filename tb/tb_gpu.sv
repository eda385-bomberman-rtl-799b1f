// tb_gpu: whole GPU behind a real raster. The host port loads random tile
// map, tile bitmaps, sprite attributes, sprite bitmaps and palettes through
// the address decoder and reads samples of each back. Then every pixel of a
// full frame is compared with a reference picture computed by the testbench:
// tile colour, overlaid by the sprite colour where the sprite pixel is not
// transparent, looked up in the palette; black outside the visible area.
// RGB must appear four clocks after the counters. Also checks one vertical
// blank interrupt per frame.
module tb_gpu;
  import bomberman_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [CNT_W-1:0] hcount, vcount;
  logic hsync, vsync, active, pix_tick;
  rgb_t rgb;
  logic irq, sprite_busy, sprite_overrun;
  logic host_en = 1'b0, host_we = 1'b0;
  logic [GPU_AW-1:0] host_addr = '0;
  logic [HOST_DW-1:0] host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  logic [17:0] map_ref [512];
  logic [15:0] tile_ref [4096];
  logic [17:0] sam_ref [1024];
  logic [15:0] spr_ref [4096];
  logic [17:0] pal_ref [256];
  logic [8:0]  lb_ref  [512];

  always #5 clk = ~clk;

  vga_timing u_timing (.*);
  gpu dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at h=%0d v=%0d", what, hcount, vcount);
    end
  endtask

  task automatic host_write(input int a, input logic [17:0] d);
    @(negedge clk);
    host_en = 1; host_we = 1; host_addr = GPU_AW'(a); host_wdata = d;
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask

  task automatic host_read(input int a, output logic [17:0] d);
    @(negedge clk);
    host_en = 1; host_we = 0; host_addr = GPU_AW'(a);
    @(negedge clk);
    host_en = 0;
    d = host_rdata;
  endtask

  function automatic void render_ref(input int line);
    for (int i = 0; i < 512; i++) lb_ref[i] = 9'h100;
    for (int s = 0; s < 512; s++) begin
      logic [17:0] w0, w1;
      int dy, row, x, bmp, col, nib;
      w0 = sam_ref[2*s]; w1 = sam_ref[2*s+1];
      dy = (line - int'(w0[7:0])) & 255;
      if (w0[17] && dy < 16) begin
        row = w1[17] ? 15 - dy : dy;
        x   = int'(w0[16:8]);
        bmp = int'(w1[5:0]);
        for (int i = 0; i < 16; i++) begin
          col = w1[16] ? 15 - i : i;
          nib = (spr_ref[bmp*64 + row*4 + col/4] >> (4*(col%4))) & 15;
          if (nib != 0) lb_ref[(x + i) & 511] = {1'b0, w1[15:12], 4'(nib)};
        end
      end
    end
  endfunction

  function automatic logic [17:0] pixel_ref(input int h, input int v);
    automatic int lx = h / 2, ly = v / 2, e, w, tc;
    e  = map_ref[(ly / 16) * 32 + lx / 16];
    w  = tile_ref[(e & 63) * 64 + (ly % 16) * 4 + (lx % 16) / 4];
    tc = (w >> (4 * (lx % 4))) & 15;
    if (lb_ref[lx][8]) return pal_ref[((e >> 12) & 15) * 16 + tc];
    return pal_ref[lb_ref[lx][7:0]];
  endfunction

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int irqs = 0;
  always @(posedge clk) if (irq && !rst) irqs++;

  initial begin
    logic [17:0] d;
    automatic int cur_line = -1, sprite_px = 0, tile_px = 0, black = 0;
    int hh [5], vv [5];
    bit tt [5], aa [5];
    for (int i = 0; i < 512; i++)  map_ref[i]  = {2'b00, 4'($urandom), 6'd0, 6'($urandom)};
    for (int i = 0; i < 4096; i++) tile_ref[i] = 16'($urandom);
    for (int i = 0; i < 4096; i++) begin
      logic [15:0] w;
      for (int k = 0; k < 4; k++) w[4*k +: 4] = ($urandom_range(0, 2) == 0) ? 4'd0 : 4'($urandom_range(1, 15));
      spr_ref[i] = w;
    end
    for (int i = 0; i < 256; i++) pal_ref[i] = 18'($urandom);
    for (int s = 0; s < 512; s++) begin
      sam_ref[2*s]   = (s < 40) ? {1'b1, 9'($urandom_range(0, 330)), 8'($urandom_range(0, 245))} : 18'd0;
      sam_ref[2*s+1] = {1'($urandom), 1'($urandom), 4'($urandom), 6'd0, 6'($urandom)};
    end
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 512; i++)  host_write(32'h0000 + i, map_ref[i]);
    for (int i = 0; i < 4096; i++) host_write(32'h1000 + i, {2'b00, tile_ref[i]});
    for (int i = 0; i < 1024; i++) host_write(32'h2000 + i, sam_ref[i]);
    for (int i = 0; i < 4096; i++) host_write(32'h3000 + i, {2'b00, spr_ref[i]});
    for (int i = 0; i < 256; i++)  host_write(32'h4000 + i, pal_ref[i]);
    for (int i = 0; i < 20; i++) begin
      automatic int a = $urandom_range(0, 511);
      host_read(32'h0000 + a, d); check(d == map_ref[a], "map readback");
      a = $urandom_range(0, 4095);
      host_read(32'h1000 + a, d); check(d == {2'b00, tile_ref[a]}, "tile readback");
      a = $urandom_range(0, 1023);
      host_read(32'h2000 + a, d); check(d == sam_ref[a], "SAM readback");
      a = $urandom_range(0, 4095);
      host_read(32'h3000 + a, d); check(d == {2'b00, spr_ref[a]}, "sprite readback");
      a = $urandom_range(0, 255);
      host_read(32'h4000 + a, d); check(d == pal_ref[a], "palette readback");
    end
    wait (vcount == 524);
    wait (vcount == 0);
    // compare rgb with the counters seen four clocks earlier, for a frame
    for (int k = 0; k < 5; k++) begin hh[k] = 0; vv[k] = 0; tt[k] = 0; aa[k] = 0; end
    for (int c = 0; c < 800 * 525 * 4; c++) begin
      @(posedge clk); #1;
      for (int k = 4; k > 0; k--) begin hh[k] = hh[k-1]; vv[k] = vv[k-1]; tt[k] = tt[k-1]; aa[k] = aa[k-1]; end
      hh[0] = hcount; vv[0] = vcount; tt[0] = pix_tick; aa[0] = active;
      if (tt[4] && c >= 4) begin
        if (!aa[4]) begin
          check(rgb == '0, "black outside the picture");
          black++;
        end else begin
          if (vv[4] / 2 != cur_line) begin
            cur_line = vv[4] / 2;
            render_ref(cur_line);
          end
          check(rgb == pixel_ref(hh[4], vv[4]), "pixel colour");
          if (lb_ref[hh[4] / 2][8]) tile_px++; else sprite_px++;
        end
      end
    end
    check(sprite_px > 5000 && tile_px > 100000, "sprite and tile pixels shown");
    check(irqs == 2, "one vblank interrupt per frame");
    $display("sprite pixels %0d, tile pixels %0d, blank %0d, irqs %0d", sprite_px, tile_px, black, irqs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gpu_sprite: runs the sprite handler behind a real raster (vga_timing).
// Frame A: 24 random sprites (random positions including wrap-around,
// palettes, bitmaps with transparent pixels, X/Y mirroring, some disabled);
// every visible pixel of frame 1 is compared with a reference line buffer
// the testbench builds from its own copy of SAM and bitmaps, and each line
// render must take 512 + 2*512 + 19*n clocks for n sprites on the line.
// Frame B: 100 sprites on the same lines, which cannot be drawn in one line
// time; overrun must be reported. Also checks host read-back.
module tb_gpu_sprite;
  import bomberman_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [CNT_W-1:0] hcount, vcount;
  logic hsync, vsync, active, pix_tick;
  logic [COLOR_W-1:0] color_idx;
  logic [PAL_W-1:0] palette_idx;
  logic transparent, busy, overrun;
  logic host_ce = 1'b0, host_we = 1'b0;
  logic [12:0] host_addr = '0;
  logic [HOST_DW-1:0] host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  logic [17:0] sam_ref [1024];
  logic [15:0] spr_ref [4096];
  logic [8:0]  lb_ref  [512];   // {transparent, palette, colour}

  always #5 clk = ~clk;

  vga_timing u_timing (.*);
  gpu_sprite dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at h=%0d v=%0d", what, hcount, vcount);
    end
  endtask

  task automatic host_write(input logic [12:0] a, input logic [17:0] d);
    @(negedge clk);
    host_ce = 1; host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_ce = 0; host_we = 0;
  endtask

  task automatic host_read(input logic [12:0] a, output logic [17:0] d);
    @(negedge clk);
    host_ce = 1; host_we = 0; host_addr = a;
    @(negedge clk);
    host_ce = 0;
    d = host_rdata;
  endtask

  // reference render of one logical line; returns the number of sprites hit
  function automatic int render_ref(input int line);
    automatic int n = 0;
    for (int i = 0; i < 512; i++) lb_ref[i] = 9'h100;
    for (int s = 0; s < 512; s++) begin
      logic [17:0] w0, w1;
      int dy, row, x, bmp, col, nib;
      w0 = sam_ref[2*s]; w1 = sam_ref[2*s+1];
      dy = (line - int'(w0[7:0])) & 255;
      if (w0[17] && dy < 16) begin
        n++;
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
    return n;
  endfunction

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- render duration monitor ----
  int  busy_start, cyc = 0, exp_n = 0, timed = 0, overruns = 0;
  bit  timing_on = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) begin
    if (!rst && pix_tick && hcount == 0) begin
      automatic int nv = (vcount == 524) ? 0 : vcount + 1;
      if (nv % 2 == 0) begin
        exp_n = -1;
        if (timing_on) begin
          automatic logic [8:0] save [512];
          save = lb_ref;
          exp_n = render_ref((nv / 2) & 255);
          lb_ref = save;
        end
      end
    end
    if (overrun) overruns++;
  end
  logic busy_q = 0;
  always @(posedge clk) begin
    busy_q <= busy;
    if (busy && !busy_q) busy_start = cyc;
    if (!busy && busy_q && timing_on && exp_n >= 0) begin
      check(cyc - busy_start == 512 + 1024 + 19 * exp_n, "render time 1536 + 19n");
      timed++;
    end
  end

  initial begin
    logic [17:0] d;
    automatic int pix = 0, cur_line = -1;
    // sprite bitmaps: each nibble transparent with probability 1/4
    for (int i = 0; i < 4096; i++) begin
      logic [15:0] w;
      for (int k = 0; k < 4; k++) w[4*k +: 4] = ($urandom_range(0, 3) == 0) ? 4'd0 : 4'($urandom_range(1, 15));
      spr_ref[i] = w;
    end
    // frame A attributes
    for (int s = 0; s < 512; s++) begin
      sam_ref[2*s] = '0; sam_ref[2*s+1] = '0;
      if (s < 24) begin
        sam_ref[2*s]   = {($urandom_range(0, 5) != 0), 9'($urandom_range(0, 511)), 8'($urandom_range(0, 255))};
        sam_ref[2*s+1] = {1'($urandom), 1'($urandom), 4'($urandom), 6'd0, 6'($urandom)};
      end
    end
    sam_ref[2*24]   = {1'b1, 9'd505, 8'd250};   // wraps in X and Y
    sam_ref[2*24+1] = {2'b01, 4'd7, 6'd0, 6'd3};
    sam_ref[2*25]   = {1'b1, 9'd100, 8'd20};    // overlaps the next one
    sam_ref[2*25+1] = {2'b00, 4'd2, 6'd0, 6'd9};
    sam_ref[2*26]   = {1'b1, 9'd108, 8'd26};
    sam_ref[2*26+1] = {2'b10, 4'd5, 6'd0, 6'd10};

    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 4096; i++) host_write(13'h1000 | 13'(i), {2'b00, spr_ref[i]});
    for (int i = 0; i < 1024; i++) host_write(13'(i), sam_ref[i]);
    for (int i = 0; i < 40; i++) begin
      automatic int a = $urandom_range(0, 1023);
      host_read(13'(a), d);
      check(d == sam_ref[a], "SAM readback");
      a = $urandom_range(0, 4095);
      host_read(13'h1000 | 13'(a), d);
      check(d == {2'b00, spr_ref[a]}, "bitmap readback");
    end

    // wait for the start of frame 1 (line 0 rendered at the end of frame 0)
    wait (vcount == 524);
    timing_on = 1;
    wait (vcount == 0);
    // check every visible pixel of the frame
    while (vcount < 480) begin
      @(posedge clk);
      if (pix_tick && active) begin
        automatic int lx = hcount / 2, ly = vcount / 2;
        if (ly != cur_line) begin
          cur_line = ly;
          void'(render_ref(ly));
        end
        @(posedge clk); @(posedge clk); #1;
        check(transparent == lb_ref[lx][8], "transparency");
        if (!lb_ref[lx][8]) begin
          check(color_idx == lb_ref[lx][3:0] && palette_idx == lb_ref[lx][7:4], "sprite pixel");
          pix++;
        end
      end
    end
    check(pix > 1000, "enough sprite pixels seen");
    check(timed > 200, "render times measured");
    check(overruns == 0, "no overrun with 27 sprites");
    $display("frame A: %0d sprite pixels, %0d line renders timed", pix, timed);

    // frame B: 100 sprites on lines 50..65
    timing_on = 0;
    wait (vcount == 480);
    for (int s = 0; s < 100; s++) begin
      sam_ref[2*s] = {1'b1, 9'(s * 3), 8'd50};
      host_write(13'(2*s), sam_ref[2*s]);
    end
    timing_on = 1;
    wait (vcount == 200);
    check(overruns > 0, "overrun with 100 sprites on a line");
    $display("overruns seen: %0d", overruns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

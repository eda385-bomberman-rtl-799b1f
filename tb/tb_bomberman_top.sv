// tb_bomberman_top: end-to-end run of the whole console hardware at its
// default sizes, playing the role of the game software and of four pads.
//  - loads tiles, map, palettes, sprite bitmaps and 40 random sprites, plus
//    95 sprites crowded onto logical lines 228..243 so that the line render
//    overruns there; compares every pixel of a frame with a reference picture
//    (lines hit by the overrun are skipped) and checks the sync outputs
//  - counts vblank interrupts, X- and Y-mirrored sprite pixels, sprite pixels
//    over tiles and tiles seen through transparent sprite pixels
//  - plays a sample stream through the sound ring buffer, refilling the idle
//    half whenever the polled half flag changes, until the buffer has wrapped;
//    the PWM output must reproduce every sample as ten 256-clock periods of
//    duty s/256, in order
//  - four pad models with different buttons; each pad's register must match
//    after every poll
// Mechanisms that never happen count as failures.
module tb_bomberman_top;
  import bomberman_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic gpu_en = 1'b0, gpu_we = 1'b0;
  logic [GPU_AW-1:0] gpu_addr = '0;
  logic [HOST_DW-1:0] gpu_wdata = '0, gpu_rdata;
  logic irq, sprite_busy, sprite_overrun;
  logic [RGB_W-1:0] vga_r, vga_g, vga_b;
  logic vga_hsync, vga_vsync;
  logic snd_en = 1'b0, snd_we = 1'b0;
  logic [9:0] snd_addr = '0;
  logic [HOST_DW-1:0] snd_wdata = '0, snd_rdata;
  logic pwm_out;
  logic [3:0] pad_latch, pad_pulse, pad_data;
  logic [3:0] pad_en = '0;
  logic [HOST_DW-1:0] pad_rdata [4];
  int checks = 0, failures = 0;

  logic [17:0] map_ref [512];
  logic [15:0] tile_ref [4096];
  logic [17:0] sam_ref [1024];
  logic [15:0] spr_ref [4096];
  logic [17:0] pal_ref [256];
  logic [8:0]  lb_ref  [512];

  always #5 clk = ~clk;

  bomberman_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic gpu_write(input int a, input logic [17:0] d);
    @(negedge clk);
    gpu_en = 1; gpu_we = 1; gpu_addr = GPU_AW'(a); gpu_wdata = d;
    @(negedge clk);
    gpu_en = 0; gpu_we = 0;
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

  localparam int RUN = 5400000;   // clocks: > 2048 samples x 2560 clocks

  initial begin
    repeat (RUN + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- event counters ----------------
  int irqs = 0, overruns = 0;
  always @(posedge clk) if (!rst) begin
    if (irq) irqs++;
    if (sprite_overrun) overruns++;
  end

  // ---------------- pad models ----------------
  logic [7:0] pressed [4];
  for (genvar p = 0; p < 4; p++) begin : g_pad
    logic [7:0] sreg = '1;
    always @(posedge pad_latch[p] or posedge pad_pulse[p]) begin
      if (pad_latch[p]) sreg <= ~pressed[p];
      else              sreg <= {1'b1, sreg[7:1]};
    end
    assign pad_data[p] = sreg[0];
  end

  // ---------------- video ----------------
  int x_flip_px = 0, y_flip_px = 0, sprite_px = 0, tile_px = 0, see_through = 0;
  bit video_done = 0;

  function automatic void count_flips(input int line, input int lx);
    for (int s = 0; s < 512; s++) begin
      automatic logic [17:0] w0 = sam_ref[2*s], w1 = sam_ref[2*s+1];
      automatic int dy = (line - int'(w0[7:0])) & 255;
      automatic int dx = (lx - int'(w0[16:8])) & 511;
      if (w0[17] && dy < 16 && dx < 16) begin
        if (w1[16]) x_flip_px++;
        if (w1[17]) y_flip_px++;
      end
    end
  endfunction

  initial begin
    automatic int cur_line = -1, hs_low = 0, vs_low = 0, frame_clk = 0;
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
      sam_ref[2*s]   = 18'd0;
      if (s < 40)       sam_ref[2*s] = {1'b1, 9'($urandom_range(0, 330)), 8'($urandom_range(0, 210))};
      else if (s < 135) sam_ref[2*s] = {1'b1, 9'((s - 40) * 3), 8'd228};
      sam_ref[2*s+1] = {1'($urandom), 1'($urandom), 4'($urandom), 6'd0, 6'($urandom)};
    end
    wait (!rst);
    for (int i = 0; i < 512; i++)  gpu_write(32'h0000 + i, map_ref[i]);
    for (int i = 0; i < 4096; i++) gpu_write(32'h1000 + i, {2'b00, tile_ref[i]});
    for (int i = 0; i < 1024; i++) gpu_write(32'h2000 + i, sam_ref[i]);
    for (int i = 0; i < 4096; i++) gpu_write(32'h3000 + i, {2'b00, spr_ref[i]});
    for (int i = 0; i < 256; i++)  gpu_write(32'h4000 + i, pal_ref[i]);
    @(posedge irq);            // frame 0 blanking
    @(posedge irq);            // frame 1 blanking: frame 1 picture follows
    // wait for the start of frame 2: the first clock of vsync low + 43 lines
    @(negedge vga_vsync);
    repeat ((2 + 33) * 800 * 4 - 4) @(posedge clk);
    // now at the first clock of line 0 (plus the 4-clock pipeline)
    for (int k = 0; k < 5; k++) begin hh[k] = 0; vv[k] = 0; tt[k] = 0; aa[k] = 0; end
    for (int c = 0; c < 800 * 525 * 4; c++) begin
      automatic int h = (c / 4) % 800, v = (c / 4) / 800;
      @(posedge clk); #1;
      if (!vga_hsync) hs_low++;
      if (!vga_vsync) vs_low++;
      if (c % 4 == 3) begin
        // pixel (h, v) is on the outputs in its last clock
        automatic logic [17:0] got = {vga_r, vga_g, vga_b};
        if (h >= 640 || v >= 480) begin
          check(got == '0, "black outside the picture");
        end else if ((v / 2) < 228) begin
          if (v / 2 != cur_line) begin
            cur_line = v / 2;
            render_ref(cur_line);
          end
          check(got == pixel_ref(h, v), "pixel colour");
          if (lb_ref[h / 2][8]) begin
            tile_px++;
            if (h % 2 == 0 && v % 2 == 0) begin
              // a tile seen where some sprite has a transparent pixel
              for (int s = 0; s < 40; s++) begin
                automatic int dy = (v / 2 - int'(sam_ref[2*s][7:0])) & 255;
                automatic int dx = (h / 2 - int'(sam_ref[2*s][16:8])) & 511;
                if (dy < 16 && dx < 16) begin see_through++; break; end
              end
            end
          end else begin
            sprite_px++;
            if (h % 2 == 0 && v % 2 == 0) count_flips(v / 2, h / 2);
          end
        end
      end
    end
    check(hs_low == 525 * 96 * 4, "hsync 96 pixels per line");
    check(vs_low == 2 * 800 * 4, "vsync 2 lines per frame");
    video_done = 1;
  end

  // ---------------- sound ----------------
  logic [7:0] stream [4096];
  int played = 0;
  bit sound_done = 0;

  initial begin
    automatic int fill_ptr = 2048, last_half = 0, refills = 0;
    for (int i = 0; i < 4096; i++) begin
      stream[i] = 8'($urandom_range(1, 255));
      if (i > 0 && stream[i] == stream[i-1]) stream[i] = stream[i] ^ 8'h80;
    end
    // fill the whole buffer while in reset
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      snd_en = 1; snd_we = 1; snd_addr = 10'(i); snd_wdata = {2'b00, stream[2*i+1], stream[2*i]};
    end
    @(negedge clk); snd_en = 0; snd_we = 0;
    rst = 0;
    // software loop: poll the half flag, refill the idle half
    while (!sound_done) begin
      repeat (1000) @(negedge clk);
      snd_en = 1; snd_we = 0;
      @(negedge clk);
      snd_en = 0;
      if (int'(snd_rdata[0]) != last_half) begin
        last_half = snd_rdata[0];
        for (int i = 0; i < 512; i++) begin
          automatic int wa = (((fill_ptr / 1024) % 2) ? 512 : 0) + i;
          @(negedge clk);
          snd_en = 1; snd_we = 1; snd_addr = 10'(wa);
          snd_wdata = {2'b00, stream[(fill_ptr + 2*i + 1) % 4096], stream[(fill_ptr + 2*i) % 4096]};
        end
        @(negedge clk); snd_en = 0; snd_we = 0;
        fill_ptr += 1024;
        refills++;
      end
    end
    check(refills >= 2, "sound buffer refilled on half change");
  end

  // PWM decoder: duty of each 256-clock period, grouped into runs
  initial begin
    automatic int cnt_high = 0, since_rise = 0, run_val = -1, run_len = 0, periods = 0;
    automatic bit last = 0;
    wait (!rst);
    forever begin
      @(posedge clk); #1;
      if (pwm_out && !last) begin
        if (periods > 0) begin
          check(since_rise == 256, "PWM period 256 clocks");
          if (cnt_high == run_val) run_len++;
          else begin
            if (run_val >= 0) begin
              check(run_len == 10, "ten PWM periods per sample");
              check(run_val == int'(stream[played % 4096]), "sample played in order");
              played++;
            end
            run_val = cnt_high; run_len = 1;
          end
        end
        periods++;
        cnt_high = 0; since_rise = 0;
      end
      if (pwm_out) cnt_high++;
      since_rise++;
      last = pwm_out;
      if (played >= 2060) sound_done = 1;
    end
  end

  // ---------------- gamepads ----------------
  int pad_polls [4];
  for (genvar p = 0; p < 4; p++) begin : g_pad_check
    initial begin
      pad_polls[p] = 0;
      pressed[p] = 8'(1 << p) | 8'(8'h10 << p);
      wait (!rst);
      forever begin
        @(negedge pad_latch[p]);
        // the word is complete 17 half periods after the latch falls
        repeat (17 * 600 + 8) @(posedge clk);
        @(negedge clk);
        pad_en[p] = 1'b1;
        @(negedge clk);
        pad_en[p] = 1'b0;
        check(pad_rdata[p] == {10'd0, ~pressed[p]}, "pad register");
        pad_polls[p]++;
        pressed[p] = 8'($urandom);
      end
    end
  end

  // ---------------- summary ----------------
  initial begin
    wait (!rst);
    wait (video_done && sound_done);
    check(irqs >= 3, "vblank interrupts");
    check(overruns > 0, "sprite line overrun");
    check(sprite_px > 5000, "sprite pixels over tiles");
    check(see_through > 100, "tiles through transparent sprite pixels");
    check(x_flip_px > 100, "X-mirrored sprites");
    check(y_flip_px > 100, "Y-mirrored sprites");
    check(played >= 2049, "sound buffer wrapped");
    for (int p = 0; p < 4; p++) check(pad_polls[p] >= 3, "pad polled");
    $display("irqs %0d overruns %0d sprite_px %0d see_through %0d xflip %0d yflip %0d samples %0d polls %0d/%0d/%0d/%0d",
             irqs, overruns, sprite_px, see_through, x_flip_px, y_flip_px, played,
             pad_polls[0], pad_polls[1], pad_polls[2], pad_polls[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

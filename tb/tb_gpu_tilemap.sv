// tb_gpu_tilemap: fills MAP and TILES with random words through the host
// port, reads a sample back, then presents random raster positions and
// compares the colour and palette index two clocks later with a reference
// lookup done in the testbench (logical pixel = screen pixel / 2).
module tb_gpu_tilemap;
  import bomberman_pkg::*;

  logic clk = 1'b0;
  logic [CNT_W-1:0] hcount = '0, vcount = '0;
  logic [COLOR_W-1:0] color_idx;
  logic [PAL_W-1:0] palette_idx;
  logic host_ce = 1'b0, host_we = 1'b0;
  logic [12:0] host_addr = '0;
  logic [HOST_DW-1:0] host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  logic [17:0] map_ref [512];
  logic [15:0] tile_ref [4096];

  always #5 clk = ~clk;

  gpu_tilemap dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
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

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [17:0] d;
    int h, v, lx, ly, e, w;
    for (int i = 0; i < 512; i++) begin
      map_ref[i] = {2'b00, 4'($urandom), 6'd0, 6'($urandom)};
      host_write(13'(i), map_ref[i]);
    end
    for (int i = 0; i < 4096; i++) begin
      tile_ref[i] = 16'($urandom);
      host_write(13'h1000 | 13'(i), {2'b00, tile_ref[i]});
    end
    for (int i = 0; i < 50; i++) begin
      automatic int a = $urandom_range(0, 511);
      host_read(13'(a), d);
      check(d == map_ref[a], "map readback");
      a = $urandom_range(0, 4095);
      host_read(13'h1000 | 13'(a), d);
      check(d == {2'b00, tile_ref[a]}, "tile readback");
    end
    for (int i = 0; i < 3000; i++) begin
      h = (i < 1000) ? (i % 640) : $urandom_range(0, 639);
      v = (i < 1000) ? (2 * (i / 640) + 37) : $urandom_range(0, 479);
      @(negedge clk);
      hcount = CNT_W'(h); vcount = CNT_W'(v);
      @(posedge clk); @(posedge clk); #1;
      lx = h / 2; ly = v / 2;
      e = map_ref[(ly / 16) * 32 + lx / 16];
      w = tile_ref[(e & 63) * 64 + (ly % 16) * 4 + (lx % 16) / 4];
      check(color_idx == 4'((w >> (4 * (lx % 4))) & 15), "colour index");
      check(palette_idx == 4'((e >> 12) & 15), "palette index");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gpu_addresser: random host accesses over the whole 15-bit address
// space. Checks that exactly the chip enable of the addressed memory block
// is raised and that the read data returned one clock later is the data of
// that block (the blocks are modelled by distinct random values), or zero
// for an unused region.
module tb_gpu_addresser;
  import bomberman_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic host_en = 1'b0;
  logic [GPU_AW-1:0] host_addr = '0;
  logic [HOST_DW-1:0] host_rdata;
  logic ce_tilemap, ce_sprite, ce_palette;
  logic [HOST_DW-1:0] rdata_tilemap, rdata_sprite, rdata_palette;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gpu_addresser dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s addr=%h", what, host_addr);
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
    int region;
    int seen [8];
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 8; i++) seen[i] = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      host_en   = 1'b1;
      host_addr = GPU_AW'($urandom);
      region    = host_addr[14:12];
      seen[region]++;
      #1;
      check(ce_tilemap == (region <= 1), "tilemap enable");
      check(ce_sprite  == (region == 2 || region == 3), "sprite enable");
      check(ce_palette == (region == 4), "palette enable");
      @(posedge clk);
      // blocks answer with their data in the next clock
      rdata_tilemap = 18'($urandom); rdata_sprite = 18'($urandom); rdata_palette = 18'($urandom);
      #1;
      host_en = 1'b0;
      #1;
      check(!ce_tilemap && !ce_sprite && !ce_palette, "no enable when idle");
      case (region)
        0, 1:    check(host_rdata == rdata_tilemap, "tilemap data");
        2, 3:    check(host_rdata == rdata_sprite, "sprite data");
        4:       check(host_rdata == rdata_palette, "palette data");
        default: check(host_rdata == '0, "unused region reads zero");
      endcase
    end
    for (int i = 0; i < 8; i++) check(seen[i] > 100, "every region accessed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gpu_interrupt: runs three frames of raster counters and checks that irq
// pulses exactly once per frame, for one clock, at the first clock of line
// 480, and that consecutive pulses are one frame (1680000 clocks) apart.
module tb_gpu_interrupt;
  import bomberman_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [CNT_W-1:0] hcount, vcount;
  logic hsync, vsync, active, pix_tick, irq;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vga_timing u_timing (.*);
  gpu_interrupt dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at h=%0d v=%0d", what, hcount, vcount);
    end
  endtask

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic longint cyc = 0, last = -1;
    automatic int pulses = 0;
    logic [CNT_W-1:0] v_prev, h_prev;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int c = 0; c < 3 * 1680000 + 100; c++) begin
      @(posedge clk);
      h_prev = hcount; v_prev = vcount;
      #1;
      cyc++;
      if (irq) begin
        pulses++;
        // irq follows the first clock with the counters at (0, 480)
        check(h_prev == 0 && v_prev == 480, "irq position");
        if (last >= 0) check(cyc - last == 1680000, "irq period one frame");
        last = cyc;
      end
    end
    check(pulses == 3, "one irq per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

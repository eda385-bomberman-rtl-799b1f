// tb_sound_generator: fills the 1024-word ring buffer with random samples
// and plays it for two and a half turns. At each sample tick the sample on
// sample_data must be the next one in buffer order (low byte first), ticks
// must be exactly 2560 clocks apart (39.06 kHz at 100 MHz), the playing-half
// flag read through the host port must follow the sample address, and
// samples rewritten into the idle half while playing must be heard on the
// next turn.
module tb_sound_generator;
  import bomberman_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic host_en = 1'b0, host_we = 1'b0;
  logic [9:0] host_addr = '0;
  logic [HOST_DW-1:0] host_wdata = '0, host_rdata;
  logic sample_tick, playing_half;
  logic [7:0] sample_data;
  int checks = 0, failures = 0;
  logic [15:0] buf_ref [1024];

  always #5 clk = ~clk;

  sound_generator dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (14000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // host writes happen in the negedge half; playback checks at posedge
  initial begin
    automatic longint cyc = 0, last_tick = -1;
    automatic int t = 0, refills = 0, last_half = 0, flag_reads = 0;
    for (int i = 0; i < 1024; i++) begin
      buf_ref[i] = 16'($urandom);
      @(negedge clk);
      host_en = 1; host_we = 1; host_addr = 10'(i); host_wdata = {2'b00, buf_ref[i]};
    end
    @(negedge clk); host_en = 0; host_we = 0;
    rst = 0;
    while (t < 5120) begin
      @(posedge clk);
      cyc++;
      #1;
      if (sample_tick) begin
        automatic int a = t % 2048;
        automatic logic [15:0] w = buf_ref[a / 2];
        check(sample_data == ((a % 2) ? w[15:8] : w[7:0]), "sample order");
        if (last_tick >= 0) check(cyc - last_tick == 2560, "sample period 2560 clocks");
        last_tick = cyc;
        t++;
      end
      // every 97 samples read the half flag through the host port
      if (sample_tick && (t % 97) == 5) begin
        @(negedge clk); host_en = 1; host_we = 0;
        @(negedge clk); host_en = 0;
        check(host_rdata == 18'(((t % 2048) >= 1024) ? 1 : 0), "half flag");
        flag_reads++;
        cyc += 1;
      end
      // refill the idle half when playback crosses into the other half
      if (playing_half != last_half) begin
        last_half = playing_half;
        for (int i = 0; i < 512; i++) begin
          automatic int wa = (playing_half ? 0 : 512) + i;
          buf_ref[wa] = 16'($urandom);
          @(negedge clk);
          host_en = 1; host_we = 1; host_addr = 10'(wa); host_wdata = {2'b00, buf_ref[wa]};
          @(posedge clk); cyc++;
          #1;
          if (sample_tick) begin
            automatic int a = t % 2048;
            automatic logic [15:0] w = buf_ref[a / 2];
            check(sample_data == ((a % 2) ? w[15:8] : w[7:0]), "sample order during refill");
            check(cyc - last_tick == 2560, "sample period during refill");
            last_tick = cyc;
            t++;
          end
        end
        @(negedge clk); host_en = 0; host_we = 0;
        refills++;
      end
    end
    check(refills >= 4, "idle half refilled while playing");
    check(flag_reads > 40, "half flag polled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

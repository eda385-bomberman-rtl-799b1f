// tb_gamepad_if: connects the reader to a model of the pad's shift register
// (parallel load while LATCH is high, shift on each rising PULSE edge,
// pressed buttons read as 0) and changes the pressed buttons between polls.
// Checks the button word after each poll (bit 0 = A ... bit 7 = Right),
// the host read-back, LATCH width (12 us), PULSE high and low times (6 us),
// eight pulses per poll, and the poll period. The poll period is shortened
// to 20000 clocks to keep the run short.
module tb_gamepad_if;
  import bomberman_pkg::*;

  localparam int POLL = 20000;

  logic clk = 1'b0, rst = 1'b1;
  logic pad_latch, pad_pulse, pad_data;
  logic [7:0] buttons;
  logic update;
  logic host_en = 1'b0;
  logic [HOST_DW-1:0] host_rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gamepad_if #(.POLL_CYCLES(POLL)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // ---- pad model ----
  logic [7:0] pressed = 8'h01;    // 1 = pressed, bit 0 = A
  logic [7:0] sreg = '1;
  always @(posedge pad_latch or posedge pad_pulse) begin
    if (pad_latch) sreg <= ~pressed;
    else           sreg <= {1'b1, sreg[7:1]};
  end
  assign pad_data = sreg[0];

  initial begin
    repeat (POLL * 25) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- waveform measurements ----
  longint cyc = 0, latch_rise = -1, pulse_rise, pulse_fall = -1;
  int pulses = 0, latch_w = 0;
  logic latch_q = 0, pulse_q = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    latch_q <= pad_latch;
    pulse_q <= pad_pulse;
    if (pad_latch && !latch_q) begin
      if (latch_rise >= 0) begin
        check(cyc - latch_rise == POLL, "poll period");
        check(pulses == 8, "eight pulses per poll");
      end
      latch_rise = cyc;
      pulses = 0;
    end
    if (!pad_latch && latch_q) check(cyc - latch_rise == 1200, "latch 12 us");
    if (pad_pulse && !pulse_q) begin
      pulse_rise = cyc;
      pulses++;
      if (pulses > 1) check(cyc - pulse_fall == 600, "pulse low 6 us");
    end
    if (!pad_pulse && pulse_q) begin
      check(cyc - pulse_rise == 600, "pulse high 6 us");
      pulse_fall = cyc;
    end
  end

  initial begin
    automatic int polls = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 20; n++) begin
      @(posedge update);
      @(negedge clk);
      check(buttons == ~pressed, "button word");
      host_en = 1;
      @(negedge clk);
      host_en = 0;
      check(host_rdata == {10'd0, ~pressed}, "host read");
      // change the buttons while the reader is idle
      pressed = (n == 0) ? 8'h80 : 8'($urandom);
      polls++;
    end
    check(polls == 20, "all polls done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pwm: feeds samples at the 2560-clock sample period and measures the
// output. For each sample s the output must be high for exactly s clocks in
// every 256-clock period (one high pulse per period, periods 256 clocks
// apart), i.e. 10*s clocks per sample period; 0 must give a constant low and
// 255 a single low clock per period.
module tb_pwm;
  logic clk = 1'b0, rst = 1'b1;
  logic sample_tick = 1'b0;
  logic [7:0] sample_data = '0;
  logic pwm_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pwm dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s sample=%0d", what, sample_data);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] s, prev;
    repeat (3) @(posedge clk);
    rst = 0;
    prev = 0;
    for (int n = 0; n < 150; n++) begin
      automatic int high = 0, rises = 0;
      logic last;
      s = (n == 0) ? 8'd0 : (n == 1) ? 8'd255 : (n == 2) ? 8'd1 : 8'($urandom);
      // tick at the sample period, as the sound generator gives it
      repeat (2559) @(posedge clk);
      @(negedge clk); sample_tick = 1; sample_data = s;
      @(negedge clk); sample_tick = 0;
      // skip the period in which the new sample takes over
      repeat (512) @(posedge clk);
      #1;
      last = pwm_out;
      for (int c = 0; c < 256 * 7; c++) begin
        @(posedge clk); #1;
        if (pwm_out) high++;
        if (pwm_out && !last) rises++;
        last = pwm_out;
      end
      check(high == 7 * int'(s), "duty = sample / 256");
      check(rises == ((s == 0) ? 0 : 7), "one pulse per 256 clocks");
      prev = s;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

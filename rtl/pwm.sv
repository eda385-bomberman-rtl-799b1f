// pwm: 8-bit pulse width modulator for the audio output.
//
// An 8-bit counter runs at the system clock and wraps every 256 clocks. The
// output goes high when the counter starts a period and low when the counter
// equals the held sample, so each 256-clock period holds sample_q clocks of
// high output (duty sample/256; 0 gives a constant low). sample_data is
// captured on every sample_tick and takes effect at the next period boundary
// (counter wrap), so no period is cut short. A low-pass filter or the speaker
// itself turns the pulse train into the audio waveform.
//
// Timing: pwm_out is registered; with the counter at c during a clock, pwm_out
// is high in the following clock for c = 0 .. sample_q-1.
//
// Counter width, set-at-start / clear-on-equal behaviour and the sample
// register follow the original design; the priority of the clear over the set (so a
// zero sample stays low) and the hand-over at the counter wrap are this
// design's choices.
module pwm (
  input  logic       clk,
  input  logic       rst,
  input  logic       sample_tick,
  input  logic [7:0] sample_data,
  output logic       pwm_out
);

  logic [7:0] cnt;
  logic [7:0] sample_q;
  logic [7:0] sample_next;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      sample_q    <= '0;
      sample_next <= '0;
      pwm_out     <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      if (sample_tick)    sample_next <= sample_data;
      if (cnt == 8'hFF)   sample_q    <= sample_tick ? sample_data : sample_next;
      if (cnt == sample_q)  pwm_out <= 1'b0;
      else if (cnt == 8'd0) pwm_out <= 1'b1;
    end
  end

endmodule

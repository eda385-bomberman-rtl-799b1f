// sound_generator: sample ring buffer feeding the PWM audio output.
//
// The host fills a dual-port buffer of BUF_WORDS 18-bit words, two 8-bit
// samples per word (first sample in bits [7:0], second in [15:8]). A cyclic
// sample address advances once per sample period, SAMPLE_DIV system clocks
// (100 MHz / 2560 = 39.06 kHz: ten PWM periods of 256 clocks per sample), and
// wraps at the end of the buffer, so the buffer is played as a ring. The most
// significant bit of the sample address tells which half is being played;
// software refills the other half. Any host read returns that bit in
// data_out[0].
//
// Outputs: sample_tick is a one-clock pulse at each sample period (the
// "39.1 kHz clock"); sample_data is the sample at the current address, stable
// from two clocks after the address changes until the next tick, so a PWM
// that loads it on sample_tick plays sample n during period n+1.
// Host port: block-RAM style, writes take one clock, read data follows the
// clock after host_en.
//
// The ring buffer, sample packing, sample-rate rule and half flag follow the
// original design; the buffer size, byte order and one-clock tick are this design's
// choices.
module sound_generator
  import bomberman_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV = 2560,
  parameter int unsigned BUF_WORDS  = 1024
) (
  input  logic               clk,
  input  logic               rst,
  // host port
  input  logic               host_en,
  input  logic               host_we,
  input  logic [$clog2(BUF_WORDS)-1:0] host_addr,
  input  logic [HOST_DW-1:0] host_wdata,
  output logic [HOST_DW-1:0] host_rdata,
  // to the PWM
  output logic               sample_tick,
  output logic [7:0]         sample_data,
  output logic               playing_half
);

  localparam int unsigned WA_W  = $clog2(BUF_WORDS);
  localparam int unsigned SA_W  = WA_W + 1;            // sample address
  localparam int unsigned DIV_W = $clog2(SAMPLE_DIV);

  logic [15:0]      buf_mem [BUF_WORDS];
  logic [DIV_W-1:0] div;
  logic [SA_W-1:0]  saddr;
  logic [15:0]      word_q;
  logic             sel_q;

  initial for (int i = 0; i < BUF_WORDS; i++) buf_mem[i] = '0;

  // host side: writes into the buffer, reads return the playing half
  always_ff @(posedge clk) begin
    if (host_en) begin
      if (host_we) buf_mem[host_addr] <= host_wdata[15:0];
      host_rdata <= HOST_DW'(saddr[SA_W-1]);
    end
  end

  // sample clock and cyclic address
  always_ff @(posedge clk) begin
    if (rst) begin
      div         <= '0;
      saddr       <= '0;
      sample_tick <= 1'b0;
    end else begin
      sample_tick <= 1'b0;
      if (div == DIV_W'(SAMPLE_DIV - 1)) begin
        div         <= '0;
        saddr       <= saddr + 1'b1;   // wraps at the end of the buffer
        sample_tick <= 1'b1;
      end else begin
        div <= div + 1'b1;
      end
    end
  end

  // playback port
  always_ff @(posedge clk) begin
    word_q      <= buf_mem[saddr[SA_W-1:1]];
    sel_q       <= saddr[0];
  end

  assign sample_data  = sel_q ? word_q[15:8] : word_q[7:0];
  assign playing_half = saddr[SA_W-1];

endmodule

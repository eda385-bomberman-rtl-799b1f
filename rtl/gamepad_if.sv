// gamepad_if: reader for one NES gamepad.
//
// The pad holds an 8-bit parallel-load shift register. Once per poll period
// this block raises LATCH to load the button states, then clocks them out
// with eight PULSE pulses. The first bit (A) is on DATA as soon as the latch
// has been given; each rising PULSE edge brings the next bit, in the order
// A, B, Select, Start, Up, Down, Left, Right. Every bit is sampled at the end
// of the low phase before the next rising edge, i.e. just before the pad
// changes DATA. When all eight bits are in, they are copied to the buttons
// register (bit 0 = A ... bit 7 = Right) and the update pulse is given.
// The register is readable by the host at any time (data_out[7:0]).
// DATA is stored as the pad drives it (a pressed button reads 0 on a standard
// pad); it is synchronised with two flip-flops first.
//
// Timing (100 MHz clock): PULSE high and low HALF_CYCLES each (6 us), LATCH
// high LATCH_CYCLES (12 us) followed by one low half period before the first
// pulse, one read every POLL_CYCLES (60 Hz). A read takes
// LATCH_CYCLES + 17*HALF_CYCLES clocks (114 us).
//
// The latch/pulse protocol, bit order, 8 pulses and the 6 us half period
// follow the original design. The latch width, the gap before the first pulse, the
// sampling point and the poll rate are this design's choices.
module gamepad_if
  import bomberman_pkg::*;
#(
  parameter int unsigned HALF_CYCLES  = 600,
  parameter int unsigned LATCH_CYCLES = 1200,
  parameter int unsigned POLL_CYCLES  = 1666667
) (
  input  logic               clk,
  input  logic               rst,
  // pad pins
  output logic               pad_latch,
  output logic               pad_pulse,
  input  logic               pad_data,
  // state
  output logic [7:0]         buttons,
  output logic               update,
  // host port (read only)
  input  logic               host_en,
  output logic [HOST_DW-1:0] host_rdata
);

  localparam int unsigned PW = $clog2(POLL_CYCLES);
  localparam int unsigned TW = $clog2(LATCH_CYCLES > HALF_CYCLES ? LATCH_CYCLES : HALF_CYCLES);

  typedef enum logic [2:0] {G_IDLE, G_LATCH, G_GAP, G_HIGH, G_LOW} gstate_e;

  gstate_e      state;
  logic [PW-1:0] poll_cnt;
  logic [TW-1:0] tcnt;
  logic [3:0]    bitn;
  logic [7:0]    shift;
  logic [1:0]    data_sync;

  always_ff @(posedge clk) begin
    if (rst) data_sync <= '1;
    else     data_sync <= {data_sync[0], pad_data};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= G_IDLE;
      poll_cnt  <= '0;
      tcnt      <= '0;
      bitn      <= '0;
      shift     <= '0;
      buttons   <= '1;
      update    <= 1'b0;
      pad_latch <= 1'b0;
      pad_pulse <= 1'b0;
    end else begin
      update   <= 1'b0;
      poll_cnt <= (poll_cnt == PW'(POLL_CYCLES - 1)) ? '0 : poll_cnt + 1'b1;
      tcnt     <= tcnt + 1'b1;
      unique case (state)
        G_IDLE: begin
          if (poll_cnt == '0) begin
            state     <= G_LATCH;
            pad_latch <= 1'b1;
            tcnt      <= '0;
          end
        end
        G_LATCH: begin
          if (tcnt == TW'(LATCH_CYCLES - 1)) begin
            state     <= G_GAP;
            pad_latch <= 1'b0;
            tcnt      <= '0;
          end
        end
        G_GAP, G_LOW: begin
          if (tcnt == TW'(HALF_CYCLES - 1)) begin
            tcnt <= '0;
            if (bitn == 4'd8) begin
              // eighth pulse given: the word is complete
              buttons <= shift;
              update  <= 1'b1;
              bitn    <= '0;
              state   <= G_IDLE;
            end else begin
              shift[bitn[2:0]] <= data_sync[1];
              bitn      <= bitn + 1'b1;
              pad_pulse <= 1'b1;
              state     <= G_HIGH;
            end
          end
        end
        G_HIGH: begin
          if (tcnt == TW'(HALF_CYCLES - 1)) begin
            tcnt      <= '0;
            pad_pulse <= 1'b0;
            state     <= G_LOW;
          end
        end
        default: state <= G_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (host_en) host_rdata <= HOST_DW'(buttons);
  end

  // the pad is never latched and clocked at once
  assert property (@(posedge clk) disable iff (rst) !(pad_latch && pad_pulse));

endmodule

// adc_reader: reads channels 0..CHANNELS-1 of an MCP3008 ADC over SPI.
//
// On each start request the FSM sends, for every channel in turn, the 17-bit
// single-ended command {start=1, SGL=1, channel[2:0], 12 zeros} through an
// spi_master and keeps the last 10 bits received, which carry the 10-bit
// conversion result (after the sample clock and the null bit). States follow
// the design description: IDLE -> T1 (trigger the SPI master) -> RW1 (wait
// for its data, store it) -> READ_NEXT_CHANNEL -> T1 ... -> IDLE. The channel
// results hold their values between reads. In the levitator, channel 0 is the
// IR distance sensor and channels 1..4 are the Kp, Ki, Kd and bias pots.
//
// Timing: the FSM and the SPI master advance on cycles with ce high; start may
// be a single clock-cycle pulse (it is held until the next ce). One channel
// takes 2*17+~6 ce periods; `done` pulses for one ce period after the last
// channel. Synchronous active-high reset clears the results.
module adc_reader #(
  parameter int CHANNELS = 5
) (
  input  logic       clk,
  input  logic       ce,
  input  logic       rst,
  input  logic       start,
  input  logic       miso,
  output logic       mosi,
  output logic       sck,
  output logic       cs_n,
  output logic [9:0] channels [CHANNELS],
  output logic       done
);
  localparam int CMD_W = 17;

  typedef enum logic [1:0] {S_IDLE, S_T1, S_RW1, S_READ_NEXT_CHANNEL} state_t;
  state_t state;

  logic             start_pending;
  logic             trigger;
  logic [2:0]       chan;
  logic [CMD_W-1:0] command;
  logic [CMD_W-1:0] received;
  logic             new_data, busy, load_unused;
  logic [7:0]       cs_all;

  spi_master #(.INOUTWIDTH(CMD_W)) u_spi (
    .clk, .ce, .rst, .ss(3'd0), .data_to_send(command), .how_many_bytes(16'd1),
    .trigger, .miso, .sck, .mosi, .cs(cs_all), .data_in(received),
    .busy, .new_data, .load(load_unused));

  assign cs_n = cs_all[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= S_IDLE;
      start_pending <= 1'b0;
      trigger       <= 1'b0;
      chan          <= '0;
      command       <= '0;
      done          <= 1'b0;
      for (int i = 0; i < CHANNELS; i++) channels[i] <= '0;
    end else begin
      if (start) start_pending <= 1'b1;
      if (ce) begin
        done <= 1'b0;
        unique case (state)
          S_IDLE: begin
            trigger <= 1'b0;
            if (start_pending || start) begin
              start_pending <= 1'b0;
              chan          <= '0;
              command       <= {2'b11, 3'd0, 12'd0};
              state         <= S_T1;
            end
          end
          S_T1: begin
            trigger <= 1'b1;
            if (busy && !new_data) begin
              trigger <= 1'b0;
              state   <= S_RW1;
            end
          end
          S_RW1: if (new_data) begin
            channels[chan] <= received[9:0];
            if (32'(chan) == CHANNELS - 1) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              chan  <= chan + 1'b1;
              state <= S_READ_NEXT_CHANNEL;
            end
          end
          S_READ_NEXT_CHANNEL: begin
            command <= {2'b11, chan, 12'd0};
            state   <= S_T1;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule

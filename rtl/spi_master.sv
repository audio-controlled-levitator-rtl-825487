// spi_master: SPI mode-0 master with a clock enable.
//
// On trigger the chip select of slave `ss` goes low (cs is one-hot, active
// low, 8 slaves), then INOUTWIDTH bits of data_to_send are shifted out MSB
// first on MOSI while MISO is shifted in. MOSI changes while SCK is low and
// MISO is sampled as SCK rises. After each word the received bits appear on
// data_in with new_data high; `how_many_bytes` words are transferred back to
// back (each re-sending data_to_send) before chip select is released. busy is
// high from the trigger until the release; load is high while idle.
//
// Timing: every register moves only on cycles with ce high, and SCK toggles
// once per such cycle, so the SCK period is two ce periods. new_data is high
// for one ce period. A word of N bits takes 2N+2 ce periods including select
// and release. The port list follows the design description, with ce added so
// that the block runs on the system clock instead of a divided clock.
// Synchronous active-high reset returns to idle with chip selects high.
module spi_master #(
  parameter int INOUTWIDTH = 24
) (
  input  logic                  clk,
  input  logic                  ce,
  input  logic                  rst,
  input  logic [2:0]            ss,
  input  logic [INOUTWIDTH-1:0] data_to_send,
  input  logic [15:0]           how_many_bytes,
  input  logic                  trigger,
  input  logic                  miso,
  output logic                  sck,
  output logic                  mosi,
  output logic [7:0]            cs,
  output logic [INOUTWIDTH-1:0] data_in,
  output logic                  busy,
  output logic                  new_data,
  output logic                  load
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FINISH} state_t;
  state_t state;

  localparam int BW = $clog2(INOUTWIDTH + 1);

  logic [INOUTWIDTH-1:0] shift_out, shift_in;
  logic [BW-1:0]         bit_cnt;     // bits sampled in the current word
  logic [15:0]           word_cnt;
  logic                  word_done;   // last bit of a word sampled, more to come

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      sck       <= 1'b0;
      mosi      <= 1'b0;
      cs        <= '1;
      data_in   <= '0;
      busy      <= 1'b0;
      new_data  <= 1'b0;
      load      <= 1'b1;
      shift_out <= '0;
      shift_in  <= '0;
      bit_cnt   <= '0;
      word_cnt  <= '0;
      word_done <= 1'b0;
    end else if (ce) begin
      new_data <= 1'b0;
      unique case (state)
        S_IDLE: begin
          sck  <= 1'b0;
          load <= 1'b1;
          if (trigger) begin
            cs        <= ~(8'b1 << ss);
            mosi      <= data_to_send[INOUTWIDTH-1];
            shift_out <= data_to_send << 1;
            shift_in  <= '0;
            bit_cnt   <= '0;
            word_cnt  <= '0;
            word_done <= 1'b0;
            busy      <= 1'b1;
            load      <= 1'b0;
            state     <= S_RUN;
          end else begin
            cs   <= '1;
            mosi <= 1'b0;
            busy <= 1'b0;
          end
        end
        S_RUN: begin
          if (!sck) begin
            // rising edge: sample MISO
            sck      <= 1'b1;
            shift_in <= {shift_in[INOUTWIDTH-2:0], miso};
            if (bit_cnt == BW'(INOUTWIDTH - 1)) begin
              data_in  <= {shift_in[INOUTWIDTH-2:0], miso};
              new_data <= 1'b1;
              bit_cnt  <= '0;
              if (word_cnt + 16'd1 >= how_many_bytes) state <= S_FINISH;
              else begin
                word_cnt  <= word_cnt + 16'd1;
                word_done <= 1'b1;
              end
            end else begin
              bit_cnt <= bit_cnt + 1'b1;
            end
          end else begin
            // falling edge: present the next bit
            sck <= 1'b0;
            if (word_done) begin
              mosi      <= data_to_send[INOUTWIDTH-1];
              shift_out <= data_to_send << 1;
              word_done <= 1'b0;
            end else begin
              mosi      <= shift_out[INOUTWIDTH-1];
              shift_out <= shift_out << 1;
            end
          end
        end
        S_FINISH: begin
          sck   <= 1'b0;
          cs    <= '1;
          mosi  <= 1'b0;
          busy  <= 1'b0;
          load  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

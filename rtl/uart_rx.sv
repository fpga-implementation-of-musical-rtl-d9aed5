// uart_rx: serial-to-parallel receiver for 8-bit samples (8 data bits, no
// parity, one stop bit, least significant bit first).
//
// The line is sampled on every `tick16` enable, 16 times per bit. A falling
// edge starts a frame; the start bit is checked again half a bit later,
// and from there each data bit and the stop bit are taken 16 ticks apart,
// near the middle of the bit. A frame whose stop bit reads low is dropped.
// The input passes through a two-flop synchroniser first.
//
// The original design only states that the receiver turns the serial input into
// 8-bit parallel data with a data-ready signal, clocked at 16x the baud
// rate; the frame format, mid-bit sampling and dropping of bad frames are
// this implementation's choices. `data_ready` is a one-clock strobe (the
// cycle of the stop-bit tick), with `data` valid from then until the next
// frame ends.
module uart_rx
  import freqid_pkg::*;
(
  input  logic        clk,
  input  logic        rst,         // synchronous, active high
  input  logic        tick16,      // 16x baud-rate enable
  input  logic        rx,          // serial line, idles high
  output logic [DATA_W-1:0] data,  // last received byte
  output logic        data_ready   // one-clock strobe per good frame
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_t;

  state_t            state;
  logic [3:0]        os_cnt;    // ticks within a bit
  logic [2:0]        bit_cnt;   // data bit number
  logic [DATA_W-1:0] shreg;
  logic              rx_meta, rx_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_meta <= 1'b1;
      rx_s    <= 1'b1;
    end else begin
      rx_meta <= rx;
      rx_s    <= rx_meta;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      os_cnt     <= '0;
      bit_cnt    <= '0;
      shreg      <= '0;
      data       <= '0;
      data_ready <= 1'b0;
    end else begin
      data_ready <= 1'b0;
      if (tick16) begin
        unique case (state)
          S_IDLE: begin
            os_cnt <= '0;
            if (!rx_s) state <= S_START;
          end
          S_START: begin
            // Half a bit after the falling edge: still low means a real start bit.
            if (os_cnt == 4'd7) begin
              os_cnt  <= '0;
              bit_cnt <= '0;
              state   <= rx_s ? S_IDLE : S_DATA;
            end else begin
              os_cnt <= os_cnt + 1'b1;
            end
          end
          S_DATA: begin
            if (os_cnt == 4'd15) begin
              os_cnt  <= '0;
              shreg   <= {rx_s, shreg[DATA_W-1:1]};
              bit_cnt <= bit_cnt + 1'b1;
              if (bit_cnt == 3'd7) state <= S_STOP;
            end else begin
              os_cnt <= os_cnt + 1'b1;
            end
          end
          S_STOP: begin
            if (os_cnt == 4'd15) begin
              os_cnt <= '0;
              state  <= S_IDLE;
              if (rx_s) begin
                data       <= shreg;
                data_ready <= 1'b1;
              end
            end else begin
              os_cnt <= os_cnt + 1'b1;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // A frame takes at least ten bit times, so the strobe can never last two clocks.
  a_ready_one_clock : assert property (@(posedge clk) disable iff (rst) data_ready |=> !data_ready)
    else $error("data_ready held for more than one clock");

endmodule

// freq_identifier: musical-note frequency identifier, top level.
//
// Audio samples arrive as 8-bit signed bytes on a 19200-baud serial line.
// The chain is:
//   clock_divider -> uart_rx -> sample_shift_reg -> (bit-reversed wiring)
//   -> fft16 -> mag_sq -> led_output -> nine active-low LEDs.
// Each received byte slides the 16-sample window by one; one clock later
// the window, oldest sample first and imaginary parts zero, is wired in
// bit-reversed order onto the FFT inputs. Four clocks of FFT and one of
// magnitude square later the LED register is loaded, so a new LED pattern
// appears 7 clocks after the UART's data-ready strobe (1 window register,
// 4 FFT stages, 1 magnitude, 1 LED register), far less than the
// 52 000 clocks between two bytes. Only a window filled with 16 samples of
// one note (the 16th byte of the note and later) shows that note; the
// patterns for the diatonic scale C..C' are LED 1, 2, 3, 3+4, 5, 6+7, 8, 9,
// and silence (all-zero samples) turns every LED off.
//
// The blocks, the 100 MHz clock, the divider count of 324, the
// bit-reversal wiring at this level, the zero imaginary inputs and the
// 4+1 cycle FFT timing follow the original design. The single clock domain with
// enables in place of derived clocks and edge-sensitive ready, the reset,
// and the LED threshold are this implementation's choices.
module freq_identifier
  import freqid_pkg::*;
#(
  parameter int unsigned DIV_TERMINAL = 324,   // 100 MHz / 325 = 16 x 19231 Hz
  parameter mag_t        THRESHOLD    = MAG_W'(448)
) (
  input  logic              clk,           // 100 MHz
  input  logic              rst,           // synchronous, active high
  input  logic              uart_rx,       // serial samples, 8N1, idle high
  output logic [N_LEDS-1:0] led_n,         // bit i-1 = LED i, 0 = lit
  output logic              sample_ready,  // a byte was received
  output logic              led_update     // LED register loaded
);

  logic    tick16;
  sample_t rx_byte;
  sample_t window [N_POINTS];
  logic    window_valid;
  cplx_t   fft_in  [N_POINTS];
  cplx_t   fft_out [N_POINTS];
  logic    fft_valid;
  mag_t    mag [N_POINTS];
  logic    mag_valid;

  clock_divider #(.CNT_W(16)) u_div (
    .clk     (clk),
    .rst     (rst),
    .terminal(16'(DIV_TERMINAL)),
    .tick    (tick16)
  );

  uart_rx u_rx (
    .clk       (clk),
    .rst       (rst),
    .tick16    (tick16),
    .rx        (uart_rx),
    .data      (rx_byte),
    .data_ready(sample_ready)
  );

  sample_shift_reg #(.N(N_POINTS)) u_win (
    .clk         (clk),
    .rst         (rst),
    .shift       (sample_ready),
    .din         (rx_byte),
    .window      (window),
    .window_valid(window_valid)
  );

  // Sample n (n = 0 oldest) is window[N-1-n]; FFT input p takes sample bitrev(p).
  always_comb begin
    for (int p = 0; p < int'(N_POINTS); p++) begin
      fft_in[p].re = window[N_POINTS - 1 - int'(bitrev(LOG2_N'(p)))];
      fft_in[p].im = '0;
    end
  end

  fft16 u_fft (
    .clk      (clk),
    .rst      (rst),
    .in_valid (window_valid),
    .x        (fft_in),
    .out_valid(fft_valid),
    .y        (fft_out)
  );

  mag_sq #(.N(N_POINTS)) u_mag (
    .clk      (clk),
    .rst      (rst),
    .in_valid (fft_valid),
    .y        (fft_out),
    .out_valid(mag_valid),
    .mag      (mag)
  );

  led_output #(.N(N_POINTS), .THRESHOLD(THRESHOLD)) u_led (
    .clk     (clk),
    .rst     (rst),
    .in_valid(mag_valid),
    .mag     (mag),
    .led_n   (led_n),
    .updated (led_update)
  );

  // The FFT must finish with one window before the next sample arrives.
  logic [3:0] in_flight;
  always_ff @(posedge clk) begin
    if (rst) in_flight <= '0;
    else     in_flight <= {in_flight[2:0], window_valid};
  end

  a_fft_done_before_next_sample : assert property (
    @(posedge clk) disable iff (rst) sample_ready |-> (in_flight == '0 && !window_valid))
    else $error("sample arrived while the FFT was still busy");

endmodule

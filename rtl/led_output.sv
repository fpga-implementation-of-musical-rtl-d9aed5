// led_output: the output block, turning the spectrum into nine LED states.
//
// Samples are taken at fs = 523.25 Hz, twice the C of the middle octave,
// and the input is assumed to lie between fs/2 and fs. Such a tone
// folds onto bin k = 16 - 16*f/fs, so bins 8 down to 0 stand for 261.6 Hz
// up to 523.25 Hz in steps of fs/16 = 32.7 Hz. LED i (i = 1..9) therefore
// shows bin 9 - i: LED 1 is bin 8 (C), LED 9 is bin 0 (C one octave up).
// A bin counts as present when its squared magnitude exceeds THRESHOLD.
// The LEDs are lit by a low level. On each in_valid the whole LED
// register is loaded at once and `updated` pulses; between results the
// LEDs hold. After reset all LEDs are off.
//
// The bin-to-LED table, the 0/1 decision per bin and the active-low LEDs
// follow the original design. The decision rule (a fixed threshold on the squared
// magnitude) and its value are this implementation's choices: 448 lies
// between the weakest wanted bin (about 480, the weaker of the two bins a
// note between two bins lights) and the strongest leakage into another
// bin (about 400) for full-scale notes of the diatonic scale.
module led_output
  import freqid_pkg::*;
#(
  parameter int unsigned N         = N_POINTS,
  parameter mag_t        THRESHOLD = MAG_W'(448)
) (
  input  logic              clk,
  input  logic              rst,       // synchronous, active high
  input  logic              in_valid,
  input  mag_t              mag [N],
  output logic [N_LEDS-1:0] led_n,     // bit i-1 drives LED i; 0 = lit
  output logic              updated    // one-clock pulse when led_n loads
);

  logic [N_LEDS-1:0] led_next;

  always_comb begin
    for (int i = 1; i <= int'(N_LEDS); i++)
      led_next[i-1] = !(mag[N_LEDS-i] > THRESHOLD);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      led_n   <= '1;
      updated <= 1'b0;
    end else begin
      updated <= in_valid;
      if (in_valid) led_n <= led_next;
    end
  end

endmodule

// freqid_pkg: sizes and types shared by the musical-note frequency identifier.
//
// The identifier takes 8-bit signed audio samples, keeps the last 16 of
// them, runs a 16-point radix-2 decimation-in-time FFT on that window and
// turns the magnitudes of the spectrum into a pattern on nine LEDs. The
// 16-point size, the 8-bit data width and the 17-bit width of the
// butterfly arithmetic are the ones the original design was built around; the
// twiddle scale of 127 is this implementation's choice (it matches the
// +/-127 range of the input samples).
package freqid_pkg;

  localparam int unsigned N_POINTS = 16;   // FFT size
  localparam int unsigned LOG2_N   = 4;    // number of butterfly stages
  localparam int unsigned DATA_W   = 8;    // samples, stage data, FFT outputs
  localparam int unsigned ACC_W    = 17;   // butterfly products and sums
  localparam int unsigned MAG_W    = 2 * DATA_W + 1;  // re^2 + im^2
  localparam int unsigned N_LEDS   = 9;    // LEDs 1..9 = FFT bins 8..0
  localparam int unsigned TW_SHIFT = 7;    // twiddles are scaled by 2^7 (127)

  typedef logic signed [DATA_W-1:0] sample_t;

  typedef struct packed {
    logic signed [DATA_W-1:0] re;
    logic signed [DATA_W-1:0] im;
  } cplx_t;

  typedef logic [MAG_W-1:0] mag_t;

  // Reverse the LOG2_N low bits of an index (decimation-in-time input order).
  function automatic logic [LOG2_N-1:0] bitrev(input logic [LOG2_N-1:0] i);
    logic [LOG2_N-1:0] r;
    for (int b = 0; b < int'(LOG2_N); b++) r[b] = i[LOG2_N-1-b];
    return r;
  endfunction

endpackage

// twiddle_rom: the eight constants of the 16-point FFT,
//   W16^k = cos(2*pi*k/16) - j*sin(2*pi*k/16),  k = 0..7,
// as 8-bit signed numbers scaled by 127: w_re = round(127*cos(2*pi*k/16)),
// w_sin = round(127*sin(2*pi*k/16)), so that W = (w_re - j*w_sin)/128
// to within the rounding. The original design names these eight constants
// and the formula; the scale of 127 (the largest 8-bit value, the same scale
// as the input samples) is this implementation's choice. Purely
// combinational. All eight sine values are zero or positive, so the sign bit
// of w_sin is always 0; it is kept so that both parts share the signed 8-bit
// format the butterfly expects.
module twiddle_rom
  import freqid_pkg::*;
(
  input  logic [2:0]               k,
  output logic signed [DATA_W-1:0] w_re,   // real part
  output logic signed [DATA_W-1:0] w_sin   // minus the imaginary part
);

  always_comb begin
    unique case (k)
      3'd0: begin w_re =  8'sd127; w_sin =  8'sd0;   end
      3'd1: begin w_re =  8'sd117; w_sin =  8'sd49;  end
      3'd2: begin w_re =  8'sd90;  w_sin =  8'sd90;  end
      3'd3: begin w_re =  8'sd49;  w_sin =  8'sd117; end
      3'd4: begin w_re =  8'sd0;   w_sin =  8'sd127; end
      3'd5: begin w_re = -8'sd49;  w_sin =  8'sd117; end
      3'd6: begin w_re = -8'sd90;  w_sin =  8'sd90;  end
      default: begin w_re = -8'sd117; w_sin = 8'sd49; end
    endcase
  end

endmodule

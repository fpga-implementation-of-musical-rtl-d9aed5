// fft16: 16-point radix-2 decimation-in-time FFT, one stage per clock.
//
// The inputs must already be in bit-reversed order (x[p] = sample
// number bitrev(p)); the outputs come out in natural order, y[k] being
// bin k. Stage s (s = 0..3) pairs positions p and p + 2^s inside groups
// of 2^(s+1) and applies twiddle W16^(j * 16/2^(s+1)) to the lower one,
// j being p's place within its half-group. Each stage is eight
// fft_butterfly instances followed by a register, so a result appears
// four clocks after its input and a new input can be taken every clock.
// Every butterfly halves its result, so y = DFT(x) / 16.
//
// Four stages of one clock each, bit-reversed inputs, eight twiddle
// constants and 8-bit data follow the original design. The valid flag travelling
// with the data and the rising-edge clocking (the original design clocks the FFT
// on the falling edge) are this implementation's choices.
module fft16
  import freqid_pkg::*;
(
  input  logic  clk,
  input  logic  rst,               // synchronous, active high (clears valid only)
  input  logic  in_valid,
  input  cplx_t x [N_POINTS],      // bit-reversed order
  output logic  out_valid,         // in_valid delayed by LOG2_N cycles
  output cplx_t y [N_POINTS]       // natural order, scaled by 1/16
);

  cplx_t stage_q [LOG2_N+1][N_POINTS];   // stage_q[0] = inputs, stage_q[s+1] = registered stage s
  logic  vld_q   [LOG2_N+1];

  always_comb begin
    stage_q[0] = x;
    vld_q[0]   = in_valid;
  end

  for (genvar s = 0; s < LOG2_N; s++) begin : g_stage
    localparam int H = 1 << s;             // butterfly span
    cplx_t comb_out [N_POINTS];

    for (genvar bf = 0; bf < N_POINTS / 2; bf++) begin : g_bf
      localparam int J  = bf % H;                          // place in half-group
      localparam int P  = ((bf / H) * (2 * H)) + J;        // upper position
      localparam int Q  = P + H;                           // lower position
      localparam int TW = J * (N_POINTS / (2 * H));        // twiddle index
      logic signed [DATA_W-1:0] w_re, w_sin;

      twiddle_rom u_tw (
        .k    (3'(TW)),
        .w_re (w_re),
        .w_sin(w_sin)
      );

      fft_butterfly u_bf (
        .a    (stage_q[s][P]),
        .b    (stage_q[s][Q]),
        .w_re (w_re),
        .w_sin(w_sin),
        .y0   (comb_out[P]),
        .y1   (comb_out[Q])
      );
    end

    always_ff @(posedge clk) begin
      stage_q[s+1] <= comb_out;
      if (rst) vld_q[s+1] <= 1'b0;
      else     vld_q[s+1] <= vld_q[s];
    end
  end

  assign y         = stage_q[LOG2_N];
  assign out_valid = vld_q[LOG2_N];

endmodule

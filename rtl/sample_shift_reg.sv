// sample_shift_reg: the 16-sample window in front of the FFT.
//
// Sixteen 8-bit signed registers form a shift chain. On each `shift`
// strobe (the UART's data-ready) the new byte enters window[0] and every
// other register takes the value of its neighbour, so window[N-1] holds
// the oldest of the last N samples and all N reach the FFT in parallel.
// `window_valid` is `shift` delayed by one cycle, marking the first cycle
// the new window is visible. Because the window slides by one sample, only
// the N-th window after a fresh start holds N samples of the same input.
//
// The original design latches the new byte on one edge of the data-ready signal and
// moves the rest on the other edge; here both happen on the one clock edge
// where the strobe is seen, which gives the same result in a single clock
// domain. Registers reset to zero (the original design leaves reset unstated).
module sample_shift_reg
  import freqid_pkg::*;
#(
  parameter int unsigned N = N_POINTS
) (
  input  logic    clk,
  input  logic    rst,          // synchronous, active high
  input  logic    shift,        // one-cycle strobe: take din
  input  sample_t din,
  output sample_t window [N],   // window[0] newest, window[N-1] oldest
  output logic    window_valid  // new window visible (one cycle after shift)
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N); i++) window[i] <= '0;
      window_valid <= 1'b0;
    end else begin
      window_valid <= shift;
      if (shift) begin
        window[0] <= din;
        for (int i = 1; i < int'(N); i++) window[i] <= window[i-1];
      end
    end
  end

endmodule

// mag_sq: squared magnitude re^2 + im^2 of every FFT output, registered,
// so it costs one clock after the FFT. The squared magnitude stands in for
// the magnitude because it needs no square root; that much follows the
// design. The 17-bit result width (enough for two squares of 8-bit values)
// is this implementation's choice. out_valid is in_valid delayed by one.
module mag_sq
  import freqid_pkg::*;
#(
  parameter int unsigned N = N_POINTS
) (
  input  logic  clk,
  input  logic  rst,        // synchronous, active high
  input  logic  in_valid,
  input  cplx_t y   [N],
  output logic  out_valid,
  output mag_t  mag [N]
);

  logic signed [2*DATA_W-1:0] sq_re [N], sq_im [N];   // never negative

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      sq_re[i] = y[i].re * y[i].re;
      sq_im[i] = y[i].im * y[i].im;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(N); i++)
      mag[i] <= MAG_W'(unsigned'(sq_re[i])) + MAG_W'(unsigned'(sq_im[i]));
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end

endmodule

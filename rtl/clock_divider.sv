// clock_divider: derives the UART's 16x-baud-rate timing from the board clock.
//
// A counter runs from 0 up to `terminal` and wraps, so one period lasts
// terminal+1 clock cycles; `tick` is high for one cycle at each wrap. With
// the 100 MHz board clock and terminal = 324 the period is 3.25 us, i.e.
// 16 x 19231 Hz, within 0.2 % of 16 x 19200 baud. The count of 324 and
// the use of a counter come from the original design; the terminal count is an
// input so the rate can be changed at run time. Delivering the result as
// a one-cycle clock enable, instead of a divided clock, is this
// implementation's choice: everything downstream stays in one clock
// domain.
//
// Timing: after reset the first tick is registered terminal+1 cycles later;
// changing `terminal` takes effect at the next comparison.
module clock_divider #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,       // synchronous, active high
  input  logic [CNT_W-1:0] terminal,  // last count value; period = terminal+1
  output logic             tick       // one-cycle enable, once per period
);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt >= terminal) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule

// tb_twiddle_rom: the eight constants against round(127*cos) and
// round(127*sin) of 2*pi*k/16, computed here in real arithmetic.
module tb_twiddle_rom;
  import freqid_pkg::*;
  logic [2:0] k;
  logic signed [7:0] w_re, w_sin;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  twiddle_rom dut (.k(k), .w_re(w_re), .w_sin(w_sin));

  always #5 clk = ~clk;

  function automatic int round_r(input real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pi;
    pi = 3.14159265358979;
    for (int i = 0; i < 8; i++) begin
      k = 3'(i);
      #1;
      checks++;
      if (int'(w_re) != round_r(127.0 * $cos(2.0 * pi * i / 16.0)) ||
          int'(w_sin) != round_r(127.0 * $sin(2.0 * pi * i / 16.0))) begin
        failures++;
        $display("k=%0d: got %0d,%0d", i, w_re, w_sin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

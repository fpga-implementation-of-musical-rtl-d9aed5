// tb_fft_butterfly: one butterfly against integer and real references.
//
// For random a, b and twiddles (the eight table values and random 8-bit
// pairs) the outputs must equal floor((128*a +/- t)/256), saturated to
// 8 bits, where t = (w_re - j*w_sin)*b is computed here in plain integers.
// For table twiddles without saturation they must also lie within 2.5 of
// (a +/- W*b)/2 computed in real arithmetic with the exact W.
module tb_fft_butterfly;
  import freqid_pkg::*;
  cplx_t a, b, y0, y1;
  logic signed [7:0] w_re, w_sin;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  fft_butterfly dut (.a(a), .b(b), .w_re(w_re), .w_sin(w_sin), .y0(y0), .y1(y1));

  always #5 clk = ~clk;

  function automatic int sat8(input int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  function automatic int round_r(input real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pi, c, s, er0, ei0, er1, ei1;
    int ar, ai, br, bi, wr, ws, tr, ti, k;
    int x0r, x0i, x1r, x1i;
    bit table_tw;
    pi = 3.14159265358979;
    for (int n = 0; n < 20000; n++) begin
      ar = int'($signed(8'($urandom))); ai = int'($signed(8'($urandom)));
      br = int'($signed(8'($urandom))); bi = int'($signed(8'($urandom)));
      table_tw = (n % 2 == 0);
      k = $urandom_range(0, 7);
      if (table_tw) begin
        wr = round_r(127.0 * $cos(2.0 * pi * k / 16.0));
        ws = round_r(127.0 * $sin(2.0 * pi * k / 16.0));
      end else begin
        wr = int'($signed(8'($urandom))); ws = int'($signed(8'($urandom)));
      end
      a.re = 8'(ar); a.im = 8'(ai); b.re = 8'(br); b.im = 8'(bi);
      w_re = 8'(wr); w_sin = 8'(ws);
      #1;
      tr = wr * br + ws * bi;
      ti = wr * bi - ws * br;
      x0r = sat8((128 * ar + tr) >>> 8); x0i = sat8((128 * ai + ti) >>> 8);
      x1r = sat8((128 * ar - tr) >>> 8); x1i = sat8((128 * ai - ti) >>> 8);
      checks++;
      if (int'(y0.re) != x0r || int'(y0.im) != x0i || int'(y1.re) != x1r || int'(y1.im) != x1i) begin
        failures++;
        if (failures < 10)
          $display("a=(%0d,%0d) b=(%0d,%0d) w=(%0d,%0d): y0=(%0d,%0d) y1=(%0d,%0d) exp (%0d,%0d) (%0d,%0d)",
                   ar, ai, br, bi, wr, ws, y0.re, y0.im, y1.re, y1.im, x0r, x0i, x1r, x1i);
      end
      if (table_tw) begin
        c = $cos(2.0 * pi * k / 16.0); s = $sin(2.0 * pi * k / 16.0);
        er0 = (ar + (c * br + s * bi)) / 2.0; ei0 = (ai + (c * bi - s * br)) / 2.0;
        er1 = (ar - (c * br + s * bi)) / 2.0; ei1 = (ai - (c * bi - s * br)) / 2.0;
        if (er0 < 127.0 && er0 > -128.0 && ei0 < 127.0 && ei0 > -128.0 &&
            er1 < 127.0 && er1 > -128.0 && ei1 < 127.0 && ei1 > -128.0) begin
          checks++;
          if ((y0.re - er0) > 2.5 || (er0 - y0.re) > 2.5 || (y0.im - ei0) > 2.5 || (ei0 - y0.im) > 2.5 ||
              (y1.re - er1) > 2.5 || (er1 - y1.re) > 2.5 || (y1.im - ei1) > 2.5 || (ei1 - y1.im) > 2.5) begin
            failures++;
            if (failures < 10) $display("real mismatch k=%0d", k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

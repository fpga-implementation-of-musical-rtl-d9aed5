// tb_fft16: the 16-point FFT pipeline against two references.
//
// Reference 1 is a bit-exact model built in natural index order: the
// size-2^L transforms of every residue class of the samples are combined
// level by level, with the same floor-and-saturate butterfly and twiddles
// taken from round(127*cos/sin) in real arithmetic. Reference 2 is the
// exact DFT divided by 16, which the outputs must match within 4 LSB.
// Inputs are random complex vectors, full-scale real sines and cosines
// at several bins, and a constant. They are fed on consecutive clocks
// (one per clock) and also one at a time; every result must appear
// exactly 4 clocks after its input.
module tb_fft16;
  import freqid_pkg::*;
  localparam int N = 16;
  logic clk = 1'b0, rst, in_valid, out_valid;
  cplx_t x [N];
  cplx_t y [N];
  int checks = 0, failures = 0;

  fft16 dut (.clk(clk), .rst(rst), .in_valid(in_valid), .x(x), .out_valid(out_valid), .y(y));

  always #5 clk = ~clk;

  typedef struct { int re [N]; int im [N]; int t_in; } vec_t;
  vec_t pending [$];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int sat8(input int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  function automatic int round_r(input real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  function automatic int rev4(input int i);
    return ((i & 1) << 3) | ((i & 2) << 1) | ((i & 4) >> 1) | ((i & 8) >> 3);
  endfunction

  // Bit-exact model. e[r][k]: bin k of the transform of samples r, r+S, r+2S, ...
  function automatic void model(input int xr [N], input int xi [N], output int yr [N], output int yi [N]);
    int er [N][N], ei [N][N], nr [N][N], ni [N][N];
    int size, stride, half, o, wr, ws, tr, ti;
    real pi;
    pi = 3.14159265358979;
    for (int r = 0; r < N; r++) begin er[r][0] = xr[r]; ei[r][0] = xi[r]; end
    for (size = 2; size <= N; size *= 2) begin
      stride = N / size;          // number of residue classes at this size
      half = size / 2;
      for (int r = 0; r < stride; r++) begin
        o = r + stride;           // odd samples of class r
        for (int k = 0; k < half; k++) begin
          wr = round_r(127.0 * $cos(2.0 * pi * k * stride / N));
          ws = round_r(127.0 * $sin(2.0 * pi * k * stride / N));
          tr = wr * er[o][k] + ws * ei[o][k];
          ti = wr * ei[o][k] - ws * er[o][k];
          nr[r][k]        = sat8((128 * er[r][k] + tr) >>> 8);
          ni[r][k]        = sat8((128 * ei[r][k] + ti) >>> 8);
          nr[r][k + half] = sat8((128 * er[r][k] - tr) >>> 8);
          ni[r][k + half] = sat8((128 * ei[r][k] - ti) >>> 8);
        end
      end
      er = nr; ei = ni;
    end
    for (int k = 0; k < N; k++) begin yr[k] = er[0][k]; yi[k] = ei[0][k]; end
  endfunction

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      vec_t v;
      int mr [N], mi [N];
      real pi, dr, di;
      pi = 3.14159265358979;
      if (pending.size() == 0) begin
        failures++; $display("output with nothing pending");
      end else begin
        v = pending.pop_front();
        checks++;
        if (cycle - v.t_in != 4) begin
          failures++; $display("latency %0d, expected 4", cycle - v.t_in);
        end
        model(v.re, v.im, mr, mi);
        checks++;
        for (int k = 0; k < N; k++)
          if (int'(y[k].re) != mr[k] || int'(y[k].im) != mi[k]) begin
            failures++;
            $display("bin %0d: got (%0d,%0d) model (%0d,%0d)", k, y[k].re, y[k].im, mr[k], mi[k]);
            break;
          end
        checks++;
        for (int k = 0; k < N; k++) begin
          dr = 0.0; di = 0.0;
          for (int n = 0; n < N; n++) begin
            dr += v.re[n] * $cos(2.0 * pi * k * n / N) + v.im[n] * $sin(2.0 * pi * k * n / N);
            di += v.im[n] * $cos(2.0 * pi * k * n / N) - v.re[n] * $sin(2.0 * pi * k * n / N);
          end
          dr /= N; di /= N;
          if ((y[k].re - dr) > 4.0 || (dr - y[k].re) > 4.0 || (y[k].im - di) > 4.0 || (di - y[k].im) > 4.0) begin
            failures++;
            $display("bin %0d: got (%0d,%0d) DFT/16 (%f,%f)", k, y[k].re, y[k].im, dr, di);
            break;
          end
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one vector (natural order) for one clock; the DUT takes it bit-reversed.
  task automatic apply(input int re [N], input int im [N]);
    vec_t v;
    @(negedge clk);
    for (int p = 0; p < N; p++) begin
      x[p].re = 8'(re[rev4(p)]);
      x[p].im = 8'(im[rev4(p)]);
    end
    in_valid = 1'b1;
    v.re = re; v.im = im; v.t_in = cycle;  // value seen at the edge that takes the input
    pending.push_back(v);
  endtask

  initial begin
    int re [N], im [N];
    real pi;
    pi = 3.14159265358979;
    rst = 1'b1; in_valid = 1'b0;
    for (int p = 0; p < N; p++) x[p] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // Full-scale real tones, one per clock.
    for (int b = 0; b <= 8; b++) begin
      for (int n = 0; n < N; n++) begin
        re[n] = round_r(127.0 * $sin(2.0 * pi * b * n / N)); im[n] = 0;
      end
      apply(re, im);
      for (int n = 0; n < N; n++) re[n] = round_r(127.0 * $cos(2.0 * pi * b * n / N));
      apply(re, im);
    end
    for (int n = 0; n < N; n++) begin re[n] = -128; im[n] = 0; end
    apply(re, im);
    // Random vectors with amplitude up to 100, streamed.
    for (int t = 0; t < 200; t++) begin
      for (int n = 0; n < N; n++) begin
        re[n] = $urandom_range(0, 200) - 100; im[n] = $urandom_range(0, 200) - 100;
      end
      apply(re, im);
    end
    // Random real vectors, full 8-bit range, one at a time.
    for (int t = 0; t < 50; t++) begin
      for (int n = 0; n < N; n++) begin re[n] = int'($signed(8'($urandom))); im[n] = 0; end
      apply(re, im);
      @(negedge clk) in_valid = 1'b0;
      repeat ($urandom_range(0, 6)) @(negedge clk);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (pending.size() != 0) begin failures++; $display("%0d results missing", pending.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_freq_identifier: the whole identifier, end to end, at its default
// parameters (100 MHz clock, divider count 324, 19200 baud).
//
// A serial-port model sends 16 samples per note, each an 8N1 frame at
// 100e6/19200 = 5208 clocks per bit. Samples are
// round(127 * sin(2*pi*n*f/fs + phase)), fs = 523.25 Hz, n = 0..15, for
// the diatonic scale C4..C5. After the 16th sample of a note (the first
// window that holds only that note) the LEDs must show the note's pattern:
// C 1, D 2, E 3, F 3+4, G 5, A 6+7, B 8, C' 9 (LED i lit = led_n[i-1] low).
// A block of zero samples must turn every LED off. The notes go through
// with phase 0 (pure sines) and phase pi/2; C and C' use phase pi/2 only,
// since their pure sines sample to all zeros. Every LED update must come
// 7 clocks after the byte that caused it.
//
// Counted mechanisms, each of which must occur: divider ticks, received
// bytes, LED updates, windows still mixing two inputs (not checked),
// one-LED notes, two-LED notes, silence.
module tb_freq_identifier;
  import freqid_pkg::*;
  localparam int BIT_CLKS = 5208;           // 100 MHz / 19200 baud
  localparam real FS = 523.25;

  logic clk = 1'b0, rst, uart_rx;
  logic [8:0] led_n;
  logic sample_ready, led_update;
  int checks = 0, failures = 0;

  freq_identifier dut (.clk(clk), .rst(rst), .uart_rx(uart_rx), .led_n(led_n),
                       .sample_ready(sample_ready), .led_update(led_update));

  always #5 clk = ~clk;   // 100 MHz

  // ---- counters -----------------------------------------------------
  int cycle = 0, last_ready = -100;
  int n_ticks = 0, n_bytes = 0, n_updates = 0, n_mixed = 0;
  int n_single = 0, n_double = 0, n_silence = 0, n_sent = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && dut.tick16) n_ticks <= n_ticks + 1;
    if (!rst && sample_ready) begin
      n_bytes <= n_bytes + 1;
      last_ready <= cycle;
    end
    if (!rst && led_update) begin
      n_updates <= n_updates + 1;
      checks++;
      if (cycle - last_ready != 7) begin
        failures++;
        $display("LED update %0d clocks after the byte, expected 7", cycle - last_ready);
      end
    end
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- host serial port model --------------------------------------
  task automatic send_byte(input logic [7:0] b);
    uart_rx = 1'b0; repeat (BIT_CLKS) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rx = b[i]; repeat (BIT_CLKS) @(posedge clk); end
    uart_rx = 1'b1; repeat (BIT_CLKS) @(posedge clk);
    n_sent++;
  endtask

  function automatic int round_r(input real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  // Send 16 samples of a tone (f = 0: silence) and check the LEDs after
  // the last one. lit: expected LEDs, bit i-1 = LED i.
  task automatic play(input string name, input real f, input real phase, input logic [8:0] lit);
    real pi;
    int s, ones;
    pi = 3.14159265358979;
    for (int n = 0; n < 16; n++) begin
      s = (f == 0.0) ? 0 : round_r(127.0 * $sin(2.0 * pi * n * f / FS + phase));
      send_byte(8'(s));
      if (n < 15) n_mixed++;
    end
    // the update for the last byte lands within a few clocks of its stop bit
    repeat (20) @(posedge clk);
    #1;
    checks++;
    if (led_n !== ~lit) begin
      failures++;
      $display("%s (phase %0.2f): LEDs lit %b, expected %b", name, phase, ~led_n, lit);
    end else begin
      ones = $countones(lit);
      if (ones == 0) n_silence++;
      else if (ones == 1) n_single++;
      else n_double++;
      $display("%s (phase %0.2f): LEDs lit %b", name, phase, ~led_n);
    end
  endtask

  initial begin
    real ph;
    rst = 1'b1; uart_rx = 1'b1;
    repeat (10) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (1000) @(posedge clk);
    checks++;
    if (led_n !== 9'h1FF) begin failures++; $display("LEDs not off after reset"); end
    // D then G with pure sines, then silence
    play("D",  293.66, 0.0, 9'b000000010);
    play("G",  392.00, 0.0, 9'b000010000);
    play("silence", 0.0, 0.0, 9'b000000000);
    for (int p = 0; p < 2; p++) begin
      ph = (p == 0) ? 3.14159265358979 / 2.0 : 0.0;
      if (p == 0) play("C",  261.63, ph, 9'b000000001);
      play("D",  293.66, ph, 9'b000000010);
      play("E",  329.63, ph, 9'b000000100);
      play("F",  349.23, ph, 9'b000001100);
      play("G",  392.00, ph, 9'b000010000);
      play("A",  440.00, ph, 9'b001100000);
      play("B",  493.88, ph, 9'b010000000);
      if (p == 0) play("C'", 523.25, ph, 9'b100000000);
    end
    play("silence", 0.0, 0.0, 9'b000000000);

    checks++;
    if (n_bytes != n_updates || n_bytes != n_sent) begin
      failures++; $display("bytes %0d, LED updates %0d, sent %0d", n_bytes, n_updates, n_sent);
    end
    // the divider ticks once per 325 clocks
    checks++;
    if (n_ticks < cycle / 325 - 1 || n_ticks > cycle / 325 + 1) begin
      failures++; $display("divider ticks %0d in %0d clocks", n_ticks, cycle);
    end
    $display("mechanisms: ticks=%0d bytes=%0d led_updates=%0d mixed_windows=%0d one_led=%0d two_led=%0d silence=%0d",
             n_ticks, n_bytes, n_updates, n_mixed, n_single, n_double, n_silence);
    if (n_ticks == 0)   begin failures++; $display("divider never ticked"); end
    if (n_bytes == 0)   begin failures++; $display("no byte received"); end
    if (n_updates == 0) begin failures++; $display("LEDs never updated"); end
    if (n_mixed == 0)   begin failures++; $display("no mixed window"); end
    if (n_single == 0)  begin failures++; $display("no one-LED note"); end
    if (n_double == 0)  begin failures++; $display("no two-LED note"); end
    if (n_silence == 0) begin failures++; $display("no silence"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

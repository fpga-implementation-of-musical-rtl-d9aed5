// tb_led_output: bin-to-LED mapping, threshold and hold.
//
// Directed cases light one bin at a time (bin b must light LED 9-b only,
// by a low level) and probe the threshold (448 off, 449 on). Random
// magnitudes follow, compared with the expected pattern worked out here
// from the LED table. Between in_valid pulses the LEDs must hold, and
// `updated` must pulse one clock after each in_valid.
module tb_led_output;
  import freqid_pkg::*;
  localparam int N = 16;
  logic clk = 1'b0, rst, in_valid, updated;
  mag_t mag [N];
  logic [8:0] led_n, expected, held;
  int checks = 0, failures = 0;
  // LED i shows this FFT bin
  int bin_of_led [1:9] = '{8, 7, 6, 5, 4, 3, 2, 1, 0};

  led_output #(.N(N), .THRESHOLD(MAG_W'(448))) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .mag(mag), .led_n(led_n), .updated(updated));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_and_check(input string tag);
    expected = '1;
    for (int led = 1; led <= 9; led++)
      if (int'(mag[bin_of_led[led]]) > 448) expected[led-1] = 1'b0;
    in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
    checks++;
    if (led_n !== expected || !updated) begin
      failures++;
      $display("%s: led_n=%b expected %b updated=%b", tag, led_n, expected, updated);
    end
    // hold while no new result comes
    held = led_n;
    for (int i = 0; i < N; i++) mag[i] = MAG_W'($urandom_range(0, 20000));
    repeat (3) begin
      @(posedge clk); #1;
      checks++;
      if (led_n !== held || updated) begin failures++; $display("%s: LEDs did not hold", tag); end
    end
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0;
    for (int i = 0; i < N; i++) mag[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    checks++;
    if (led_n !== 9'h1FF) begin failures++; $display("LEDs not off after reset"); end
    for (int b = 0; b < N; b++) begin
      for (int i = 0; i < N; i++) mag[i] = '0;
      mag[b] = MAG_W'(4000);
      load_and_check($sformatf("bin %0d", b));
      // independent expectation from the table: bin b <= 8 lights LED 9-b only
      checks++;
      if (b <= 8 && held !== ~(9'b1 << (8 - b))) begin failures++; $display("bin %0d wrong LED %b", b, held); end
      if (b > 8 && held !== 9'h1FF) begin failures++; $display("mirror bin %0d lit an LED", b); end
    end
    for (int i = 0; i < N; i++) mag[i] = MAG_W'(448);
    load_and_check("at threshold");
    checks++;
    if (held !== 9'h1FF) begin failures++; $display("448 lit an LED"); end
    for (int i = 0; i < N; i++) mag[i] = MAG_W'(449);
    load_and_check("above threshold");
    checks++;
    if (held !== 9'h000) begin failures++; $display("449 did not light all"); end
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N; i++) mag[i] = MAG_W'($urandom_range(0, 1000));
      load_and_check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

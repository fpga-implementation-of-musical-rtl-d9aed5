// tb_clock_divider: checks the period of the divider's tick.
//
// With terminal = 324 (the 100 MHz / 16x19200 setting) every tick must be
// 325 clocks after the previous one, and the first one 325 clocks after
// reset. The terminal count is then changed to 9 and to 1 at run time and
// the new periods (10 and 2 clocks) are checked, along with the tick being
// exactly one clock wide.
module tb_clock_divider;
  logic        clk = 1'b0;
  logic        rst;
  logic [15:0] terminal;
  logic        tick;
  int          checks = 0, failures = 0;

  clock_divider #(.CNT_W(16)) dut (.clk(clk), .rst(rst), .terminal(terminal), .tick(tick));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Measure the distance between ticks (the tick is one clock wide, so a
  // tick two edges apart also shows it dropping in between).
  task automatic check_periods(input int expected, input int count);
    int n;
    for (int p = 0; p < count; p++) begin
      n = 0;
      do begin @(posedge clk); #1; n++; end while (!tick);
      // tick was seen n edges after the previous one
      checks++;
      if (n != expected) begin
        failures++;
        $display("period %0d: got %0d, expected %0d", p, n, expected);
      end
    end
  endtask

  initial begin
    int first;
    rst = 1'b1;
    terminal = 16'd324;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // first tick: the counter starts at the first edge after reset
    first = 0;
    do begin @(posedge clk); #1; first++; end while (!tick);
    checks++;
    if (first != 325) begin failures++; $display("first tick after %0d", first); end
    check_periods(325, 8);
    @(negedge clk) terminal = 16'd9;
    // the current period ends at the new terminal or when the count is beyond it
    do begin @(posedge clk); #1; end while (!tick);
    check_periods(10, 20);
    @(negedge clk) terminal = 16'd1;
    do begin @(posedge clk); #1; end while (!tick);
    check_periods(2, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sample_shift_reg: the 16-sample window against a queue model.
//
// Random bytes are shifted in at random intervals; after every shift the
// window must equal the last 16 bytes (newest in window[0]) in the cycle
// window_valid is high, and window_valid must be the shift strobe one
// cycle late. Between shifts the window must not change.
module tb_sample_shift_reg;
  import freqid_pkg::*;
  localparam int N = 16;
  logic clk = 1'b0, rst, shift, window_valid;
  sample_t din;
  sample_t window [N];
  sample_t model [N];
  int checks = 0, failures = 0;

  sample_shift_reg #(.N(N)) dut (.clk(clk), .rst(rst), .shift(shift), .din(din),
                                 .window(window), .window_valid(window_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string tag);
    checks++;
    for (int i = 0; i < N; i++)
      if (window[i] !== model[i]) begin
        failures++;
        $display("%s: window[%0d]=%0d expected %0d", tag, i, window[i], model[i]);
        break;
      end
  endtask

  initial begin
    rst = 1'b1; shift = 1'b0; din = '0;
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;
    compare("after reset");
    for (int n = 0; n < 300; n++) begin
      din = sample_t'($urandom); shift = 1'b1;
      for (int i = N - 1; i > 0; i--) model[i] = model[i-1];
      model[0] = din;
      @(posedge clk); #1;
      shift = 1'b0;
      checks++;
      if (!window_valid) begin failures++; $display("window_valid missing"); end
      compare("after shift");
      repeat ($urandom_range(1, 5)) begin
        @(posedge clk); #1;
        checks++;
        if (window_valid) begin failures++; $display("window_valid without shift"); end
        compare("holding");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

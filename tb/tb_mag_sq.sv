// tb_mag_sq: squared magnitudes of random and extreme complex values,
// against re*re + im*im computed here, one clock after in_valid.
module tb_mag_sq;
  import freqid_pkg::*;
  localparam int N = 16;
  logic clk = 1'b0, rst, in_valid, out_valid;
  cplx_t y [N];
  mag_t  mag [N];
  int    exp_mag [N];
  int checks = 0, failures = 0;

  mag_sq #(.N(N)) dut (.clk(clk), .rst(rst), .in_valid(in_valid), .y(y), .out_valid(out_valid), .mag(mag));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, i;
    rst = 1'b1; in_valid = 1'b0;
    for (int k = 0; k < N; k++) y[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++) begin
        if (t == 0) begin r = -128; i = -128; end
        else if (t == 1) begin r = 127; i = -128; end
        else begin r = int'($signed(8'($urandom))); i = int'($signed(8'($urandom))); end
        y[k].re = 8'(r); y[k].im = 8'(i);
        exp_mag[k] = r * r + i * i;
      end
      in_valid = 1'b1;
      @(posedge clk); #1;
      checks++;
      if (!out_valid) begin failures++; $display("out_valid missing"); end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(mag[k]) != exp_mag[k]) begin
          failures++;
          $display("bin %0d: got %0d expected %0d", k, mag[k], exp_mag[k]);
        end
      end
      @(negedge clk) in_valid = 1'b0;
      @(posedge clk); #1;
      checks++;
      if (out_valid) begin failures++; $display("out_valid without input"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_uart_rx: serial frames in, bytes out.
//
// The testbench makes its own 16x enable (one clock in 4) and sends 8N1
// frames at 64 clocks per bit, LSB first: 60 random bytes and the edge
// values 0x00, 0xFF, 0x80, 0x7F, with random idle gaps between frames.
// Each byte must come out once, with a one-clock data_ready strobe, and in
// order. A frame with a low stop bit and a two-tick glitch on the line
// must produce nothing.
module tb_uart_rx;
  import freqid_pkg::*;
  logic clk = 1'b0, rst, tick16, rx;
  logic [7:0] data;
  logic data_ready;
  int checks = 0, failures = 0;
  logic [7:0] expect_q [$];
  int strobes = 0;

  uart_rx dut (.clk(clk), .rst(rst), .tick16(tick16), .rx(rx), .data(data), .data_ready(data_ready));

  always #5 clk = ~clk;

  int tdiv = 0;
  always_ff @(posedge clk) begin
    tdiv   <= (tdiv == 3) ? 0 : tdiv + 1;
    tick16 <= (tdiv == 3);
  end

  localparam int BIT = 64;

  task automatic send(input logic [7:0] b, input logic stop_bit);
    rx = 1'b0; repeat (BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (BIT) @(posedge clk); end
    rx = stop_bit; repeat (BIT) @(posedge clk);
    rx = 1'b1;
  endtask

  // Collect and compare every strobe (outputs are only defined after reset).
  logic dr_q = 1'b0;
  always @(posedge clk) begin
    dr_q <= data_ready;
    if (!rst && data_ready && dr_q) begin
      failures++; $display("data_ready wider than one clock");
    end
    if (!rst && data_ready) begin
      strobes++;
      checks++;
      if (expect_q.size() == 0) begin
        failures++; $display("unexpected byte %02h", data);
      end else begin
        logic [7:0] e;
        e = expect_q.pop_front();
        if (data !== e) begin failures++; $display("got %02h expected %02h", data, e); end
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int sent;
    rst = 1'b1; rx = 1'b1;
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (100) @(posedge clk);
    sent = 0;
    for (int n = 0; n < 64; n++) begin
      case (n)
        0: b = 8'h00; 1: b = 8'hFF; 2: b = 8'h80; 3: b = 8'h7F;
        default: b = 8'($urandom);
      endcase
      expect_q.push_back(b);
      send(b, 1'b1);
      sent++;
      repeat ($urandom_range(0, 100)) @(posedge clk);
    end
    // Framing error: stop bit low, must be dropped.
    send(8'hA5, 1'b0);
    repeat (3 * BIT) @(posedge clk);
    // Glitch shorter than half a bit: must not start a frame.
    rx = 1'b0; repeat (8) @(posedge clk); rx = 1'b1;
    repeat (20 * BIT) @(posedge clk);
    // A good byte afterwards still arrives.
    expect_q.push_back(8'h3C);
    send(8'h3C, 1'b1);
    sent++;
    repeat (4 * BIT) @(posedge clk);
    checks++;
    if (strobes != sent || expect_q.size() != 0) begin
      failures++;
      $display("strobes %0d sent %0d left %0d", strobes, sent, expect_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

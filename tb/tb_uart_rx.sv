// tb_uart_rx: self-checking test of the UART receiver.
// Sends random 8N1 frames at 8 clocks per bit, one frame with a low stop
// bit and one glitch shorter than half a bit, and checks every received
// byte against what was sent, that the bad frame raises frame_err, and that
// the glitch produces nothing.
module tb_uart_rx;
  localparam int CPB = 8;
  logic clk = 0, rst = 1, rx = 1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0;
  logic [7:0] expq[$];
  int ferr_seen = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .rx, .data, .valid, .frame_err);

  always #5 clk = ~clk;

  task automatic send(input logic [7:0] b, input logic stop);
    rx <= 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx <= b[i]; repeat (CPB) @(posedge clk); end
    rx <= stop; repeat (CPB) @(posedge clk);
    rx <= 1; repeat (2) @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (valid && !rst) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected byte %h", data); end
      else begin
        automatic logic [7:0] e = expq.pop_front();
        if (data !== e) begin failures++; $display("byte %h expected %h", data, e); end
      end
    end
    if (frame_err && !rst) ferr_seen++;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    for (int n = 0; n < 30; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      if (n == 0) b = 8'h00;
      if (n == 1) b = 8'hFF;
      expq.push_back(b);
      send(b, 1'b1);
    end
    send(8'hA5, 1'b0);           // bad stop bit: must be dropped
    repeat (3 * CPB) @(posedge clk);
    rx <= 0; repeat (CPB / 4) @(posedge clk); rx <= 1;  // glitch
    repeat (12 * CPB) @(posedge clk);
    expq.push_back(8'h3C); send(8'h3C, 1'b1);
    repeat (4 * CPB) @(posedge clk);
    checks++; if (ferr_seen != 1) begin failures++; $display("frame_err seen %0d times", ferr_seen); end
    checks++; if (expq.size() != 0) begin failures++; $display("%0d bytes not received", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

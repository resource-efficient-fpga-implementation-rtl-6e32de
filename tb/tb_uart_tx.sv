// tb_uart_tx: self-checking test of the UART transmitter.
// Sends random bytes back to back and decodes the serial line independently
// (sampling each bit in its middle), checking data, start and stop bits and
// that each frame occupies exactly 10*CLKS_PER_BIT cycles of `busy`.
module tb_uart_tx;
  localparam int CPB = 6;
  logic clk = 0, rst = 1;
  logic [7:0] data = 0;
  logic start = 0, busy, tx;
  int checks = 0, failures = 0;
  logic [7:0] sent[$];
  int busy_len = 0, nframes = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .data, .start, .busy, .tx);

  always #5 clk = ~clk;

  // measure busy periods
  always @(posedge clk) begin
    if (busy) busy_len++;
    else if (busy_len != 0) begin
      checks++;
      if (busy_len != 10 * CPB) begin failures++; $display("busy lasted %0d", busy_len); end
      busy_len = 0;
    end
  end

  // independent line decoder
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge tx);
      repeat (CPB / 2) @(posedge clk);
      checks++; if (tx !== 1'b0) begin failures++; $display("bad start bit"); end
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = tx; end
      repeat (CPB) @(posedge clk);
      checks++; if (tx !== 1'b1) begin failures++; $display("bad stop bit"); end
      checks++;
      if (sent.size() == 0) begin failures++; $display("extra frame"); end
      else begin
        automatic logic [7:0] e = sent.pop_front();
        if (b !== e) begin failures++; $display("got %h expected %h", b, e); end
      end
      nframes++;
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    checks++; if (tx !== 1'b1) begin failures++; $display("line not idle high"); end
    for (int n = 0; n < 25; n++) begin
      while (busy) @(posedge clk);
      data  <= (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : 8'($urandom);
      start <= 1;
      @(posedge clk);
      sent.push_back(data);
      start <= 0;
      @(posedge clk);
      // a start while busy must be ignored
      if (n == 3) begin start <= 1; data <= 8'h99; @(posedge clk); start <= 0; end
    end
    while (busy) @(posedge clk);
    repeat (2 * CPB) @(posedge clk);
    checks++; if (nframes != 25) begin failures++; $display("%0d frames decoded", nframes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_score_sender: self-checking test of the score matrix sender.
// A one-cycle-latency memory model holds random scores; a transmitter model
// accepts a byte when `tx_start` is high while its `busy` is low and then
// stays busy for a random number of cycles. The bench checks that the bytes
// come out as low byte then high byte of every score in address order, that
// no byte is offered while the transmitter is busy, and that `done` pulses
// once, only after the last byte has finished.
module tb_score_sender;
  localparam int NS = 9, SW = $clog2(NS);
  logic clk = 0, rst = 1, start = 0;
  logic rd_en;
  logic [SW-1:0] rd_addr;
  logic [15:0] rd_data = 0;
  logic [7:0] tx_data;
  logic tx_start, tx_busy = 0, busy, done;
  logic [15:0] mem [NS];
  int checks = 0, failures = 0;
  int nbytes = 0, busy_left = 0, ndone = 0;
  logic [7:0] got[$];

  score_sender #(.NS(NS)) dut (.clk, .rst, .start, .rd_en, .rd_addr, .rd_data,
    .tx_data, .tx_start, .tx_busy, .busy, .done);

  always #5 clk = ~clk;

  always @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];

  // transmitter model
  always @(posedge clk) if (!rst) begin
    if (tx_start && tx_busy) begin failures++; $display("byte offered while busy"); end
    if (!tx_busy && tx_start) begin
      got.push_back(tx_data);
      tx_busy <= 1;
      busy_left = $urandom_range(1, 15);
    end else if (tx_busy) begin
      busy_left--;
      if (busy_left == 0) tx_busy <= 0;
    end
    if (done) begin
      ndone++;
      checks++;
      if (tx_busy) begin failures++; $display("done while transmitting"); end
    end
  end

  task automatic one_run();
    got.delete(); ndone = 0;
    for (int a = 0; a < NS; a++) mem[a] = 16'($urandom);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (ndone == 0) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++; if (ndone != 1) begin failures++; $display("done pulsed %0d times", ndone); end
    checks++; if (got.size() != 2 * NS) begin failures++; $display("%0d bytes", got.size()); end
    for (int a = 0; a < NS && 2 * a + 1 < got.size(); a++) begin
      checks++;
      if ({got[2 * a + 1], got[2 * a]} != mem[a]) begin
        failures++; $display("score %0d sent as %h%h expected %h", a, got[2*a+1], got[2*a], mem[a]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    one_run();
    one_run();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

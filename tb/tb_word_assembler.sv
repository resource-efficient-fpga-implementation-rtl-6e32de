// tb_word_assembler: self-checking test of the byte-pair to word assembler.
// Feeds random bytes with random gaps, checks that each word is
// {second byte, first byte} and appears one cycle after its second byte,
// and that `clear` discards a lone first byte.
module tb_word_assembler;
  logic clk = 0, rst = 1, clear = 0;
  logic [7:0] byte_in = 0;
  logic byte_valid = 0;
  logic [15:0] word;
  logic word_valid;
  int checks = 0, failures = 0;
  logic [15:0] expq[$];
  int nwords = 0;

  word_assembler dut (.clk, .rst, .clear, .byte_in, .byte_valid, .word, .word_valid);

  always #5 clk = ~clk;

  always @(posedge clk) if (word_valid && !rst) begin
    checks++; nwords++;
    if (expq.size() == 0) begin failures++; $display("extra word %h", word); end
    else begin
      automatic logic [15:0] e = expq.pop_front();
      if (word !== e) begin failures++; $display("word %h expected %h", word, e); end
    end
  end

  task automatic put(input logic [7:0] b);
    automatic int gap = $urandom_range(0, 2);
    @(negedge clk); byte_in = b; byte_valid = 1;
    @(negedge clk); byte_valid = 0;
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      automatic logic [15:0] w = 16'($urandom);
      expq.push_back(w);
      put(w[7:0]); put(w[15:8]);
      if (n == 10) begin
        put(8'hEE);                          // lone byte, then resync
        @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      end
    end
    repeat (3) @(posedge clk);
    checks++; if (nwords != 40) begin failures++; $display("%0d words", nwords); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

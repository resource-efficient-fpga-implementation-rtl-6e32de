// tb_mac_datapath: self-checking test of the pipelined Q8.8 MAC.
// Streams back-to-back dot products of random lengths (and a few with
// extreme operands that overflow the Q8.8 range) through the unit, one pair
// per cycle with no gaps, plus a stretch with idle cycles inside a dot
// product. Each result is compared with a reference computed here: the sum
// of floor(a*b / 256) over the pairs, in 64-bit arithmetic, and its clamp to
// [-32768, 32767]. It also checks the two-cycle latency: a result appears
// exactly two cycles after its last pair entered.
module tb_mac_datapath;
  import sa_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_first = 0, in_last = 0;
  q88_t a = 0, b = 0;
  logic out_valid, ovf;
  logic signed [31:0] acc_out;
  q88_t sat_out;
  int checks = 0, failures = 0;
  longint exp_acc[$];
  int last_cycle[$];
  int cycle = 0;
  int n_ovf = 0;

  mac_datapath #(.ACC_W(32)) dut (.clk, .rst, .in_valid, .in_first, .in_last, .a, .b,
                                  .out_valid, .acc_out, .sat_out, .ovf);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic longint term(input q88_t x, input q88_t y);
    longint p = longint'(x) * longint'(y);
    // floor division by 256
    if (p >= 0) return p / 256;
    else        return -((-p + 255) / 256);
  endfunction

  always @(negedge clk) if (!rst && out_valid) begin
    automatic longint e = exp_acc.pop_front();
    automatic int lc = last_cycle.pop_front();
    automatic longint es = (e > 32767) ? 32767 : (e < -32768) ? -32768 : e;
    checks++;
    if (longint'(acc_out) != e) begin failures++; $display("acc %0d expected %0d", acc_out, e); end
    checks++;
    if (longint'(sat_out) != es) begin failures++; $display("sat %0d expected %0d", sat_out, es); end
    checks++;
    if (ovf != (e != es)) begin failures++; $display("ovf flag wrong for %0d", e); end
    if (ovf) n_ovf++;
    checks++;
    if (cycle - lc != 2) begin failures++; $display("latency %0d", cycle - lc); end
  end

  task automatic dot(input int len, input int mode, input bit gaps);
    longint s = 0;
    for (int k = 0; k < len; k++) begin
      q88_t x, y;
      case (mode)
        0: begin x = q88_t'($urandom); y = q88_t'($urandom); end
        1: begin x = 16'sh7FFF; y = 16'sh7FFF; end          // large positive
        2: begin x = 16'sh8000; y = 16'sh7FFF; end          // large negative
        default: begin x = (k % 2) ? 16'sh0100 : -16'sh0180; y = 16'sh0200; end // alternating signs
      endcase
      s += term(x, y);
      @(negedge clk);
      in_valid = 1; in_first = (k == 0); in_last = (k == len - 1); a = x; b = y;
      if (k == len - 1) begin exp_acc.push_back(s); last_cycle.push_back(cycle); end
      if (gaps && k != len - 1) begin @(negedge clk); in_valid = 0; a = q88_t'($urandom); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int d = 0; d < 60; d++) dot($urandom_range(1, 12), (d < 50) ? 0 : (d % 4), 1'b0);
    for (int d = 0; d < 5; d++) dot($urandom_range(2, 6), 0, 1'b1);
    dot(1, 0, 1'b0);
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    checks++; if (exp_acc.size() != 0) begin failures++; $display("%0d results missing", exp_acc.size()); end
    checks++; if (n_ovf == 0) begin failures++; $display("no overflow exercised"); end
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

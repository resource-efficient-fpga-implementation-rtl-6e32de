// tb_self_attention_sizes: the accelerator at several matrix sizes.
// Runs one instance per size side by side (n x d_k = 1x1, 2x3, 3x16, 7x5,
// 8x8, 5x32), each with random, alternating-sign extreme and small-value
// operands, and checks every score against the bit-exact reference and the
// N*N*DK + 4 cycle compute time. Also checks that clamping occurred at least
// once across the runs.
module tb_self_attention_sizes;
  localparam int NR = 6;
  logic clk = 0, rst = 1;
  logic fin [NR];
  int c [NR], f [NR], cl [NR];
  int checks = 0, failures = 0, clamps = 0;

  always #5 clk = ~clk;

  sa_size_run #(.N(1), .DK(1))  r0 (.clk, .rst, .finished(fin[0]), .checks(c[0]), .failures(f[0]), .clamps(cl[0]));
  sa_size_run #(.N(2), .DK(3))  r1 (.clk, .rst, .finished(fin[1]), .checks(c[1]), .failures(f[1]), .clamps(cl[1]));
  sa_size_run #(.N(3), .DK(16)) r2 (.clk, .rst, .finished(fin[2]), .checks(c[2]), .failures(f[2]), .clamps(cl[2]));
  sa_size_run #(.N(7), .DK(5))  r3 (.clk, .rst, .finished(fin[3]), .checks(c[3]), .failures(f[3]), .clamps(cl[3]));
  sa_size_run #(.N(8), .DK(8))  r4 (.clk, .rst, .finished(fin[4]), .checks(c[4]), .failures(f[4]), .clamps(cl[4]));
  sa_size_run #(.N(5), .DK(32)) r5 (.clk, .rst, .finished(fin[5]), .checks(c[5]), .failures(f[5]), .clamps(cl[5]));

  function automatic bit all_done();
    for (int i = 0; i < NR; i++) if (!fin[i]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (4) @(posedge clk); rst = 0;
    while (!all_done()) @(posedge clk);
    for (int i = 0; i < NR; i++) begin checks += c[i]; failures += f[i]; clamps += cl[i]; end
    checks++;
    if (clamps == 0) begin failures++; $display("no score was clamped"); end
    $display("clamped scores: %0d", clamps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

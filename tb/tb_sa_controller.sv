// tb_sa_controller: self-checking test of the six-state controller.
// The memories and the MAC are replaced by simple models in this bench: a
// MAC model answers each `mac_last` two cycles later with the index of the
// dot product as its result. The bench checks the load addresses, the
// Q/K read address sequence of the i, j, k loops (Q(i,k) with K(j,k)), the
// first/last tags one cycle behind the reads, the score write addresses and
// data, the time spent in COMPUTE (N*N*DK cycles), ACCUMULATE (3) and STORE
// (1), the start of the score transmission, the done flag, that words sent
// while computing are ignored, and a second complete run.
module tb_sa_controller;
  import sa_pkg::*;
  localparam int N = 3, DK = 4, MW = N * DK;
  localparam int AW = $clog2(MW), LAW = $clog2(3 * MW), SW = $clog2(N * N);
  logic clk = 0, rst = 1;
  logic word_valid = 0;
  logic [15:0] word_data = 0;
  logic asm_clear, ld_en, qk_rd_en, mac_valid, mac_first, mac_last;
  logic [LAW-1:0] ld_addr;
  logic [15:0] ld_data;
  logic [AW-1:0] q_rd_addr, k_rd_addr;
  logic mac_out_valid = 0;
  q88_t mac_result = 0;
  logic sc_wr_en;
  logic [SW-1:0] sc_wr_addr;
  q88_t sc_wr_data;
  logic send_start, send_done = 0;
  sa_state_t state;
  logic done;
  int checks = 0, failures = 0;

  sa_controller #(.N(N), .DK(DK)) dut (.clk, .rst, .word_valid, .word_data, .asm_clear,
    .ld_en, .ld_addr, .ld_data, .qk_rd_en, .q_rd_addr, .k_rd_addr, .mac_valid, .mac_first,
    .mac_last, .mac_out_valid, .mac_result, .sc_wr_en, .sc_wr_addr, .sc_wr_data,
    .send_start, .send_done, .state, .done);

  always #5 clk = ~clk;

  // MAC model: result = index of the dot product, two cycles after `last`
  logic [1:0] lastpipe = 0;
  int dp_idx = 0;
  always @(posedge clk) begin
    lastpipe <= {lastpipe[0], (!rst && mac_valid && mac_last)};
    mac_out_valid <= lastpipe[0];
    if (lastpipe[0]) begin mac_result <= q88_t'(dp_idx * 3 + 1); dp_idx <= dp_idx + 1; end
  end

  // monitors
  int rd_n = 0, tag_n = 0, wr_n = 0, ld_n = 0;
  int n_comp = 0, n_acc = 0, n_store = 0, n_start = 0;
  logic prev_rd = 0;
  int prev_k = 0;
  always @(negedge clk) if (!rst) begin
    if (ld_en) begin
      checks++;
      if (ld_addr != LAW'(ld_n) || ld_data != 16'(ld_n ^ 16'h5A5A)) begin
        failures++; $display("load %0d: addr %0d data %h", ld_n, ld_addr, ld_data);
      end
      ld_n++;
    end
    if (mac_valid) begin
      checks++;
      if (!prev_rd || mac_first != (prev_k == 0) || mac_last != (prev_k == DK - 1)) begin
        failures++; $display("tag error at read %0d", tag_n);
      end
      tag_n++;
    end
    prev_rd = qk_rd_en;
    if (qk_rd_en) begin
      automatic int k = rd_n % DK, j = (rd_n / DK) % N, i = rd_n / (DK * N);
      checks++;
      if (q_rd_addr != AW'(i * DK + k) || k_rd_addr != AW'(j * DK + k)) begin
        failures++; $display("read %0d: q %0d k %0d", rd_n, q_rd_addr, k_rd_addr);
      end
      prev_k = k;
      rd_n++;
    end
    if (sc_wr_en) begin
      checks++;
      if (sc_wr_addr != SW'(wr_n) || sc_wr_data != q88_t'(wr_n * 3 + 1)) begin
        failures++; $display("score write %0d: addr %0d data %0d", wr_n, sc_wr_addr, sc_wr_data);
      end
      wr_n++;
    end
    if (state == ST_COMPUTE) n_comp++;
    if (state == ST_ACCUMULATE) n_acc++;
    if (state == ST_STORE) n_store++;
    if (send_start) n_start++;
  end

  task automatic send_word(input int idx);
    @(negedge clk); word_valid = 1; word_data = 16'(idx ^ 16'h5A5A);
    @(negedge clk); word_valid = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  task automatic run();
    rd_n = 0; tag_n = 0; wr_n = 0; ld_n = 0; dp_idx = 0;
    n_comp = 0; n_acc = 0; n_store = 0; n_start = 0;
    for (int w = 0; w < 3 * MW; w++) send_word(w);
    // a word during computation must not be loaded
    send_word(999);
    ld_n--;
    while (state != ST_DONE) @(negedge clk);
    checks++; if (!done) begin failures++; $display("done low in DONE"); end
    checks++; if (n_comp != N * N * DK) begin failures++; $display("COMPUTE %0d cycles", n_comp); end
    checks++; if (n_acc != 3 || n_store != 1) begin failures++; $display("ACCUMULATE %0d STORE %0d", n_acc, n_store); end
    checks++; if (wr_n != N * N) begin failures++; $display("%0d scores written", wr_n); end
    checks++; if (rd_n != N * N * DK || tag_n != N * N * DK) begin failures++; $display("reads %0d tags %0d", rd_n, tag_n); end
    repeat (20) @(negedge clk);
    checks++; if (state != ST_DONE || n_start != 1) begin failures++; $display("did not wait for sender (%0d starts)", n_start); end
    send_done = 1; @(negedge clk); send_done = 0; @(negedge clk);
    checks++; if (state != ST_IDLE || !done) begin failures++; $display("not back in IDLE with done"); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    run();
    ld_n = 0;
    run();
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

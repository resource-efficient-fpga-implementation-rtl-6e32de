// tb_self_attention_full: one complete operation of the accelerator at its
// default size (N = 16, DK = 64, 100 MHz clock, 115200 baud, 868 clocks per
// bit). The bench acts as the host: it sends Q, K and V over the serial
// line, waits for `done` and the 512 bytes of the 16 x 16 score matrix, and
// compares each score with S(i,j) = clamp(sum_k floor(Q(i,k)*K(j,k) / 256))
// computed here. Q row 0 and K row 0 hold large values so that some scores
// saturate; the rest is random in [-4, 4). It also checks that COMPUTE
// through STORE takes N*N*DK + 4 cycles and that loading takes the
// 3*N*DK*2*10 bit times of the serial transfer.
module tb_self_attention_full;
  import sa_pkg::*;
  localparam int N = 16, DK = 64, CPB = 100_000_000 / 115_200;
  logic clk = 0, rst = 1, rx = 1;
  logic tx, done, sat_seen, rx_frame_err;
  sa_state_t state;
  logic [15:0] v_rd_data;
  int checks = 0, failures = 0;
  int t_comp = 0;
  longint t_load = 0;
  bit loading = 0;

  self_attention_top dut (
    .clk, .rst, .uart_rx(rx), .uart_tx(tx), .done, .state, .sat_seen, .rx_frame_err,
    .v_rd_en(1'b0), .v_rd_addr('0), .v_rd_data);

  always #5 clk = ~clk;

  q88_t qm [N][DK], km [N][DK];
  logic [7:0] rx_bytes[$];

  initial begin
    logic [7:0] b;
    forever begin
      @(negedge tx);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = tx; end
      repeat (CPB) @(posedge clk);
      if (tx !== 1'b1) begin failures++; $display("bad stop bit from accelerator"); end
      rx_bytes.push_back(b);
    end
  end

  always @(posedge clk) if (!rst) begin
    if (state == ST_COMPUTE || state == ST_ACCUMULATE || state == ST_STORE) t_comp++;
    if (loading && state != ST_COMPUTE) t_load++;
    if (state == ST_COMPUTE) loading = 0;
  end

  task automatic send_byte(input logic [7:0] b);
    rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(posedge clk); end
    rx = 1; repeat (CPB) @(posedge clk);
  endtask

  task automatic send_word(input q88_t w);
    send_byte(w[7:0]);
    send_byte(w[15:8]);
  endtask

  function automatic longint term(input q88_t x, input q88_t y);
    longint p = longint'(x) * longint'(y);
    if (p >= 0) return p / 256;
    else        return -((-p + 255) / 256);
  endfunction

  initial begin
    int nsat = 0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < DK; c++) begin
        qm[r][c] = (r == 0) ? 16'sh6000 : q88_t'($urandom_range(0, 2047)) - 16'sd1024;
        km[r][c] = (r == 0) ? -16'sh5000 : q88_t'($urandom_range(0, 2047)) - 16'sd1024;
      end
    repeat (4) @(posedge clk); rst = 0;
    repeat (4) @(posedge clk);
    loading = 1;
    for (int r = 0; r < N; r++) for (int c = 0; c < DK; c++) send_word(qm[r][c]);
    for (int r = 0; r < N; r++) for (int c = 0; c < DK; c++) send_word(km[r][c]);
    for (int r = 0; r < N; r++) for (int c = 0; c < DK; c++) send_word(q88_t'($urandom));
    while (!done) @(posedge clk);
    while (rx_bytes.size() < 2 * N * N) @(posedge clk);
    // load time against T_UART = 3*N*DK*2*10 bit times (within one bit time:
    // the last word is taken in the middle of its stop bit)
    checks++;
    if (t_load > longint'(3 * N * DK * 2 * 10 * CPB) || t_load < longint'(3 * N * DK * 2 * 10 * CPB - CPB)) begin
      failures++; $display("load took %0d cycles, expected about %0d", t_load, 3 * N * DK * 2 * 10 * CPB);
    end
    $display("load %0d cycles, compute %0d cycles", t_load, t_comp);
    checks++;
    if (t_comp != N * N * DK + 4) begin failures++; $display("COMPUTE..STORE took %0d cycles", t_comp); end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        longint e, es;
        q88_t got;
        e = 0;
        for (int k = 0; k < DK; k++) e += term(qm[i][k], km[j][k]);
        es = (e > 32767) ? 32767 : (e < -32768) ? -32768 : e;
        if (es != e) nsat++;
        got = {rx_bytes[2 * (i * N + j) + 1], rx_bytes[2 * (i * N + j)]};
        checks++;
        if (longint'(got) != es) begin failures++; $display("S(%0d,%0d) = %0d expected %0d", i, j, got, es); end
      end
    checks++; if (nsat == 0 || !sat_seen) begin failures++; $display("saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

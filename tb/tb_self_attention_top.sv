// tb_self_attention_top: end-to-end test of the accelerator at reduced size.
// Acts as the host: sends Q, K and V as Q8.8 words over the serial line
// (two 8N1 frames per word, low byte first), waits for the score matrix to
// come back over the serial line, and compares every score with a reference
// computed here, S(i,j) = clamp(sum_k floor(Q(i,k)*K(j,k) / 256)). Four runs:
// random data; extreme values whose scores overflow in both directions;
// alternating signs; random data again after a bad frame on the line.
// It also reads V back through the V port, times COMPUTE..STORE against
// N*N*DK + 4 cycles, and counts that each mechanism happened: load, the
// streamed compute without bubbles, the pipeline drain, positive and
// negative saturation, a framing error with recovery, return to IDLE and a
// repeated run.
module tb_self_attention_top;
  import sa_pkg::*;
  localparam int N = 4, DK = 8, CPB = 4, MW = N * DK, AW = $clog2(MW);
  logic clk = 0, rst = 1, rx = 1;
  logic tx, done, sat_seen, rx_frame_err;
  sa_state_t state;
  logic v_rd_en = 0;
  logic [AW-1:0] v_rd_addr = 0;
  logic [15:0] v_rd_data;
  int checks = 0, failures = 0;

  self_attention_top #(.N(N), .DK(DK), .CLKS_PER_BIT(CPB)) dut (
    .clk, .rst, .uart_rx(rx), .uart_tx(tx), .done, .state, .sat_seen, .rx_frame_err,
    .v_rd_en, .v_rd_addr, .v_rd_data);

  always #5 clk = ~clk;

  q88_t qm [N][DK], km [N][DK], vm [N][DK];
  logic [7:0] rx_bytes[$];

  // host receiver: decodes the accelerator's serial output
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

  task automatic send_byte(input logic [7:0] b, input logic stop = 1'b1);
    rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(posedge clk); end
    rx = stop; repeat (CPB) @(posedge clk);
    rx = 1; repeat ($urandom_range(0, 2)) @(posedge clk);
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

  // mechanism counters
  int m_load = 0, m_stream = 0, m_drain = 0, m_sat_pos = 0, m_sat_neg = 0;
  int m_ferr = 0, m_idle_return = 0, m_runs = 0, m_vread = 0;
  int t_comp = 0;

  always @(posedge clk) if (!rst) begin
    if (state == ST_COMPUTE || state == ST_ACCUMULATE || state == ST_STORE) t_comp++;
  end

  task automatic run(input int mode);
    longint sref [N][N];
    sa_state_t st_seen;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < DK; c++) begin
        case (mode)
          1: begin  // extremes: row 0 of K positive, row 1 negative
            qm[r][c] = (r == 0) ? 16'sh7FFF : q88_t'($urandom);
            km[r][c] = (r == 0) ? 16'sh7FFF : (r == 1) ? 16'sh8000 : q88_t'($urandom);
          end
          2: begin  // alternating signs
            qm[r][c] = ((r + c) % 2) ? 16'sh0380 : -16'sh0240;
            km[r][c] = (c % 2) ? -16'sh0155 : 16'sh0199;
          end
          default: begin
            qm[r][c] = q88_t'($urandom_range(0, 2047)) - 16'sd1024;
            km[r][c] = q88_t'($urandom_range(0, 2047)) - 16'sd1024;
          end
        endcase
        vm[r][c] = q88_t'($urandom);
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        longint s = 0;
        for (int k = 0; k < DK; k++) s += term(qm[i][k], km[j][k]);
        sref[i][j] = s;
      end
    rx_bytes.delete();
    t_comp = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < DK; c++) send_word(qm[r][c]);
    for (int r = 0; r < N; r++) for (int c = 0; c < DK; c++) send_word(km[r][c]);
    checks++; if (state != ST_LOAD) begin failures++; $display("not in LOAD while loading"); end
    else m_load++;
    for (int r = 0; r < N; r++) for (int c = 0; c < DK; c++) send_word(vm[r][c]);
    while (!done) @(posedge clk);
    while (rx_bytes.size() < 2 * N * N) @(posedge clk);
    checks++;
    if (t_comp != N * N * DK + 4) begin failures++; $display("COMPUTE..STORE took %0d cycles", t_comp); end
    else begin m_stream++; m_drain++; end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        automatic longint e = sref[i][j];
        automatic longint es = (e > 32767) ? 32767 : (e < -32768) ? -32768 : e;
        automatic q88_t got = {rx_bytes[2 * (i * N + j) + 1], rx_bytes[2 * (i * N + j)]};
        if (e > 32767) m_sat_pos++;
        if (e < -32768) m_sat_neg++;
        checks++;
        if (longint'(got) != es) begin
          failures++; $display("run %0d S(%0d,%0d) = %0d expected %0d", mode, i, j, got, es);
        end
      end
    checks++;
    if (sat_seen != (m_sat_pos + m_sat_neg > 0 && mode == 1)) begin
      failures++; $display("sat_seen %0d in run %0d", sat_seen, mode);
    end
    repeat (4 * CPB) @(posedge clk);
    checks++; if (state != ST_IDLE || !done) begin failures++; $display("not idle with done after run"); end
    else m_idle_return++;
    // V must be held as sent
    for (int a = 0; a < MW; a++) begin
      @(negedge clk); v_rd_en = 1; v_rd_addr = AW'(a);
      @(negedge clk); v_rd_en = 0;
      checks++;
      if (v_rd_data !== vm[a / DK][a % DK]) begin failures++; $display("V[%0d] = %h", a, v_rd_data); end
      else m_vread++;
    end
    m_runs++;
  endtask

  initial begin
    repeat (4) @(posedge clk); rst = 0;
    repeat (4) @(posedge clk);
    run(0);
    run(1);
    run(2);
    // a frame with a bad stop bit is dropped and flagged
    send_byte(8'h55, 1'b0);
    repeat (3 * CPB) @(posedge clk);
    checks++; if (!rx_frame_err) begin failures++; $display("frame error not flagged"); end
    else m_ferr++;
    run(0);
    // every mechanism must have happened
    checks++; if (m_load == 0)        begin failures++; $display("load never seen"); end
    checks++; if (m_stream == 0)      begin failures++; $display("streamed compute never seen"); end
    checks++; if (m_drain == 0)       begin failures++; $display("drain never seen"); end
    checks++; if (m_sat_pos == 0)     begin failures++; $display("positive saturation never seen"); end
    checks++; if (m_sat_neg == 0)     begin failures++; $display("negative saturation never seen"); end
    checks++; if (m_ferr == 0)        begin failures++; $display("framing error never seen"); end
    checks++; if (m_idle_return < 4)  begin failures++; $display("return to IDLE seen %0d times", m_idle_return); end
    checks++; if (m_runs < 4)         begin failures++; $display("%0d runs", m_runs); end
    checks++; if (m_vread == 0)       begin failures++; $display("V never read back"); end
    $display("mechanisms: load=%0d stream=%0d drain=%0d sat+=%0d sat-=%0d ferr=%0d idle=%0d runs=%0d vread=%0d",
             m_load, m_stream, m_drain, m_sat_pos, m_sat_neg, m_ferr, m_idle_return, m_runs, m_vread);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// sa_size_run: one accelerator instance of a given size, driven as a host
// would drive it. Used by tb_self_attention_sizes to run several matrix
// sizes side by side. It runs RUNS operations: random full-range values
// (which clamp often), alternating sign patterns, and small random values.
// It compares every returned score with
// S(i,j) = clamp(sum_k floor(Q(i,k)*K(j,k) / 256)), checks that COMPUTE
// through STORE takes N*N*DK + 4 cycles, and reports its counts on its ports
// when `finished` rises.
module sa_size_run #(
  parameter int N    = 2,
  parameter int DK   = 3,
  parameter int CPB  = 4,
  parameter int RUNS = 3
) (
  input  logic clk,
  input  logic rst,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   clamps
);
  import sa_pkg::*;
  localparam int AW = (N * DK > 1) ? $clog2(N * DK) : 1;
  logic rx = 1, tx, done, sat_seen, rx_frame_err;
  sa_state_t state;
  logic [15:0] v_rd_data;
  int t_comp = 0;
  q88_t qm [N][DK], km [N][DK];
  logic [7:0] rx_bytes[$];

  self_attention_top #(.N(N), .DK(DK), .CLKS_PER_BIT(CPB)) dut (
    .clk, .rst, .uart_rx(rx), .uart_tx(tx), .done, .state, .sat_seen, .rx_frame_err,
    .v_rd_en(1'b0), .v_rd_addr(AW'(0)), .v_rd_data);

  initial begin
    logic [7:0] b;
    forever begin
      @(negedge tx);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = tx; end
      repeat (CPB) @(posedge clk);
      rx_bytes.push_back(b);
    end
  end

  always @(posedge clk) if (!rst) begin
    if (state == ST_COMPUTE || state == ST_ACCUMULATE || state == ST_STORE) t_comp++;
  end

  task automatic send_byte(input logic [7:0] b);
    rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(posedge clk); end
    rx = 1; repeat (CPB + $urandom_range(0, 1)) @(posedge clk);
  endtask

  function automatic longint term(input q88_t x, input q88_t y);
    longint p = longint'(x) * longint'(y);
    if (p >= 0) return p / 256;
    else        return -((-p + 255) / 256);
  endfunction

  initial begin
    finished = 0; checks = 0; failures = 0; clamps = 0;
    @(negedge rst);
    repeat (4) @(posedge clk);
    for (int run = 0; run < RUNS; run++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < DK; c++) begin
          case (run % 3)
            0: begin qm[r][c] = q88_t'($urandom); km[r][c] = q88_t'($urandom); end
            1: begin
              qm[r][c] = ((r + c) % 2) ? 16'sh7FFF : 16'sh8000;
              km[r][c] = ((r * 3 + c) % 2) ? 16'sh8000 : 16'sh7FFF;
            end
            default: begin
              qm[r][c] = q88_t'($urandom_range(0, 511)) - 16'sd256;
              km[r][c] = q88_t'($urandom_range(0, 511)) - 16'sd256;
            end
          endcase
        end
      rx_bytes.delete();
      t_comp = 0;
      for (int r = 0; r < N; r++) for (int c = 0; c < DK; c++) begin send_byte(qm[r][c][7:0]); send_byte(qm[r][c][15:8]); end
      for (int r = 0; r < N; r++) for (int c = 0; c < DK; c++) begin send_byte(km[r][c][7:0]); send_byte(km[r][c][15:8]); end
      for (int w = 0; w < N * DK; w++) begin send_byte(8'($urandom)); send_byte(8'($urandom)); end
      while (!done) @(posedge clk);
      while (rx_bytes.size() < 2 * N * N) @(posedge clk);
      checks++;
      if (t_comp != N * N * DK + 4) begin
        failures++; $display("%0dx%0d: COMPUTE..STORE took %0d cycles", N, DK, t_comp);
      end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          longint e, es;
          q88_t got;
          e = 0;
          for (int k = 0; k < DK; k++) e += term(qm[i][k], km[j][k]);
          es = (e > 32767) ? 32767 : (e < -32768) ? -32768 : e;
          if (es != e) clamps++;
          got = {rx_bytes[2 * (i * N + j) + 1], rx_bytes[2 * (i * N + j)]};
          checks++;
          if (longint'(got) != es) begin
            failures++; $display("%0dx%0d run %0d: S(%0d,%0d) = %0d expected %0d", N, DK, run, i, j, got, es);
          end
        end
      while (state != ST_IDLE) @(posedge clk);
      repeat (3 * CPB) @(posedge clk);
    end
    finished = 1;
  end
endmodule

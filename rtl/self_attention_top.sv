// self_attention_top: FPGA self-attention score accelerator, Q*K^T in Q8.8.
//
// The host quantizes Q, K and V (each N x DK) to 16-bit Q8.8 and sends them
// over a UART, each word as two bytes, low byte first, Q then K then V, all
// row-major. The accelerator assembles the bytes into words and stores the
// three matrices in their own block RAMs (LOAD). The controller then streams
// S(i,j) = sum_k (Q(i,k)*K(j,k)) >> 8 through a two-stage pipelined MAC, one
// multiply-accumulate per clock with no bubble between dot products
// (COMPUTE, ACCUMULATE, STORE), writes the N x N scores to a score block RAM,
// and sends them back over the UART, each score as two bytes, low byte
// first (DONE). Softmax and the product with V are left to the host.
//
// Timing: the MAC consumes one operand pair per cycle, so the N*N*DK pairs
// pass through it in N*N*DK cycles plus the two-cycle pipeline fill; with the
// one-cycle BRAM read and the final score write the controller spends
// N*N*DK + 4 cycles between leaving LOAD and entering DONE. The UART dominates
// the end-to-end time: 3*N*DK*2 frames in and N*N*2 frames out, ten bit
// times each.
//
// Ports: `uart_rx`/`uart_tx` are the serial lines to the host; `done` is high
// once a score matrix is complete and until the next load begins; `state`
// shows the controller state; `sat_seen` is a sticky flag raised when a
// score had to be clamped to the Q8.8 range; `rx_frame_err` is a sticky flag
// raised when a received frame had a bad stop bit. The `v_rd_*` port reads
// the stored V matrix for a consumer outside this core. Both sticky flags
// clear when a new load begins.
// Following the document: Q8.8 arithmetic, the >>8 rescale after every
// product, the two-stage MAC, the dedicated Q/K/V BRAMs, the six-state FSM,
// the 100 MHz clock and the UART link. This design's own choices: the default
// sizes N = 16 and DK = 64, the bit rate, the byte order, the wide
// accumulator with saturation to Q8.8, the status flags and the V read port.
module self_attention_top
  import sa_pkg::*;
#(
  parameter int unsigned N            = 16,         // sequence length
  parameter int unsigned DK           = 64,         // key dimension d_k
  parameter int unsigned CLK_HZ       = 100_000_000,
  parameter int unsigned BAUD         = 115_200,
  parameter int unsigned CLKS_PER_BIT = CLK_HZ / BAUD,
  parameter int unsigned ACC_W        = 32,
  localparam int unsigned MW          = N * DK,
  localparam int unsigned AW          = (MW > 1) ? $clog2(MW) : 1,
  localparam int unsigned LAW         = $clog2(3 * MW),
  localparam int unsigned NS          = N * N,
  localparam int unsigned SW          = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic          clk,
  input  logic          rst,           // synchronous, active high
  input  logic          uart_rx,
  output logic          uart_tx,
  output logic          done,
  output sa_state_t     state,
  output logic          sat_seen,
  output logic          rx_frame_err,
  input  logic          v_rd_en,
  input  logic [AW-1:0] v_rd_addr,
  output logic [15:0]   v_rd_data
);

  // receive path
  logic [7:0]  rx_byte;
  logic        rx_valid, rx_ferr;
  logic [15:0] word;
  logic        word_valid, asm_clear;
  // memories
  logic           ld_en;
  logic [LAW-1:0] ld_addr;
  logic [15:0]    ld_data;
  logic           qk_rd_en;
  logic [AW-1:0]  q_rd_addr, k_rd_addr;
  logic [15:0]    q_rd_data, k_rd_data;
  logic           sc_wr_en;
  logic [SW-1:0]  sc_wr_addr;
  q88_t           sc_wr_data;
  logic           sc_rd_en;
  logic [SW-1:0]  sc_rd_addr;
  logic [15:0]    sc_rd_data;
  // MAC
  logic                    mac_valid, mac_first, mac_last;
  logic                    mac_out_valid, mac_ovf;
  logic signed [ACC_W-1:0] mac_acc;
  q88_t                    mac_sat;
  // transmit path
  logic       send_start, send_done, send_busy;
  logic [7:0] tx_byte;
  logic       tx_start, tx_busy;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_rx (
    .clk, .rst, .rx(uart_rx), .data(rx_byte), .valid(rx_valid), .frame_err(rx_ferr));

  word_assembler u_asm (
    .clk, .rst, .clear(asm_clear), .byte_in(rx_byte), .byte_valid(rx_valid),
    .word, .word_valid);

  sa_controller #(.N(N), .DK(DK)) u_ctrl (
    .clk, .rst,
    .word_valid, .word_data(word), .asm_clear,
    .ld_en, .ld_addr, .ld_data,
    .qk_rd_en, .q_rd_addr, .k_rd_addr,
    .mac_valid, .mac_first, .mac_last,
    .mac_out_valid, .mac_result(mac_sat),
    .sc_wr_en, .sc_wr_addr, .sc_wr_data,
    .send_start, .send_done,
    .state, .done);

  qkv_memory #(.N(N), .DK(DK)) u_qkv (
    .clk,
    .ld_en, .ld_addr, .ld_data,
    .qk_rd_en, .q_rd_addr, .k_rd_addr, .q_rd_data, .k_rd_data,
    .v_rd_en, .v_rd_addr, .v_rd_data);

  mac_datapath #(.ACC_W(ACC_W)) u_mac (
    .clk, .rst,
    .in_valid(mac_valid), .in_first(mac_first), .in_last(mac_last),
    .a(q88_t'(q_rd_data)), .b(q88_t'(k_rd_data)),
    .out_valid(mac_out_valid), .acc_out(mac_acc), .sat_out(mac_sat), .ovf(mac_ovf));

  bram_sdp #(.DW(16), .DEPTH(NS), .AW(SW)) u_scores (
    .clk,
    .wr_en(sc_wr_en), .wr_addr(sc_wr_addr), .wr_data(sc_wr_data),
    .rd_en(sc_rd_en), .rd_addr(sc_rd_addr), .rd_data(sc_rd_data));

  score_sender #(.NS(NS)) u_sender (
    .clk, .rst, .start(send_start),
    .rd_en(sc_rd_en), .rd_addr(sc_rd_addr), .rd_data(sc_rd_data),
    .tx_data(tx_byte), .tx_start, .tx_busy,
    .busy(send_busy), .done(send_done));

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_tx (
    .clk, .rst, .data(tx_byte), .start(tx_start), .busy(tx_busy), .tx(uart_tx));

  // sticky status flags, cleared when a new load starts
  always_ff @(posedge clk) begin
    if (rst || (state == ST_IDLE && word_valid)) begin
      sat_seen     <= 1'b0;
      rx_frame_err <= 1'b0;
    end else begin
      if (mac_out_valid && mac_ovf) sat_seen <= 1'b1;
      if (rx_ferr) rx_frame_err <= 1'b1;
    end
  end

  // the full-width accumulator is kept for observation in simulation
  logic unused_ok;
  assign unused_ok = ^{mac_acc, send_busy};

endmodule

// qkv_memory: the three on-chip matrix partitions for Q, K and V.
//
// Each of Q, K and V (N rows of DK Q8.8 elements, stored row-major, element
// (r,c) at address r*DK+c) lives in a block RAM of its own. The load port
// takes the words in the order the host sends them, one linear address over
// all 3*N*DK words: Q first, then K, then V. Q and K have separate read ports
// so that one Q element and one K element are read in the same cycle, which
// keeps the MAC unit busy every clock; V has its own read port for a consumer
// of V (in this design V is only held, its product is formed elsewhere).
// All reads have one cycle of latency (see bram_sdp).
// The Q-K-V load order is this design's choice; the document only says the
// three matrices arrive over UART and sit in dedicated BRAMs.
module qkv_memory #(
  parameter int unsigned N    = 16,   // sequence length (rows)
  parameter int unsigned DK   = 64,   // key dimension (columns)
  localparam int unsigned MW  = N * DK,
  localparam int unsigned AW  = (MW > 1) ? $clog2(MW) : 1,
  localparam int unsigned LAW = $clog2(3 * MW)
) (
  input  logic           clk,
  // load port, linear address over Q, K, V
  input  logic           ld_en,
  input  logic [LAW-1:0] ld_addr,
  input  logic [15:0]    ld_data,
  // parallel Q and K read ports
  input  logic           qk_rd_en,
  input  logic [AW-1:0]  q_rd_addr,
  input  logic [AW-1:0]  k_rd_addr,
  output logic [15:0]    q_rd_data,
  output logic [15:0]    k_rd_data,
  // V read port
  input  logic           v_rd_en,
  input  logic [AW-1:0]  v_rd_addr,
  output logic [15:0]    v_rd_data
);

  logic          q_we, k_we, v_we;
  logic [AW-1:0] wa;

  // split the linear load address into a partition and an offset
  always_comb begin
    q_we = 1'b0;
    k_we = 1'b0;
    v_we = 1'b0;
    wa   = '0;
    if (ld_en) begin
      if (ld_addr < LAW'(MW)) begin
        q_we = 1'b1;
        wa   = AW'(ld_addr);
      end else if (ld_addr < LAW'(2 * MW)) begin
        k_we = 1'b1;
        wa   = AW'(ld_addr - LAW'(MW));
      end else if (ld_addr < LAW'(3 * MW)) begin
        v_we = 1'b1;
        wa   = AW'(ld_addr - LAW'(2 * MW));
      end
    end
  end

  bram_sdp #(.DW(16), .DEPTH(MW), .AW(AW)) u_q (
    .clk, .wr_en(q_we), .wr_addr(wa), .wr_data(ld_data),
    .rd_en(qk_rd_en), .rd_addr(q_rd_addr), .rd_data(q_rd_data));

  bram_sdp #(.DW(16), .DEPTH(MW), .AW(AW)) u_k (
    .clk, .wr_en(k_we), .wr_addr(wa), .wr_data(ld_data),
    .rd_en(qk_rd_en), .rd_addr(k_rd_addr), .rd_data(k_rd_data));

  bram_sdp #(.DW(16), .DEPTH(MW), .AW(AW)) u_v (
    .clk, .wr_en(v_we), .wr_addr(wa), .wr_data(ld_data),
    .rd_en(v_rd_en), .rd_addr(v_rd_addr), .rd_data(v_rd_data));

endmodule

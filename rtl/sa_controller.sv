// sa_controller: six-state FSM that sequences the accelerator.
//
// States and what happens in each:
//   IDLE        waits for the first Q8.8 word from the host; that word is
//               written to load address 0 and the FSM moves to LOAD.
//   LOAD        writes every further received word to the next load address
//               (Q, then K, then V, 3*N*DK words in all); after the last one
//               the FSM moves to COMPUTE.
//   COMPUTE     runs the i, j, k loops of S(i,j) = sum_k Q(i,k)*K(j,k),
//               issuing one Q read and one K read per cycle for N*N*DK cycles
//               without a gap between dot products. The pair read in cycle c
//               reaches the MAC in cycle c+1 (the BRAM latency) with its
//               `first` (k = 0) and `last` (k = DK-1) tags. Each finished dot
//               product is written to the score memory the cycle after the MAC
//               presents it, at the next score address (row-major, i*N+j).
//   ACCUMULATE  entered after the last read: the MAC pipeline drains while the
//               final dot product is accumulated (3 cycles).
//   STORE       the final score is written to the score memory (1 cycle).
//   DONE        `done` is raised, the score sender is started, and when it
//               reports that the whole matrix has gone to the host the FSM
//               returns to IDLE. `done` stays high until a new load begins.
// Q/K addresses are kept as running pointers: the K pointer simply counts
// through K's row-major storage, the Q pointer goes back to the start of
// row i after each dot product, so no multiplier is needed for addressing.
// The state names and their roles follow the document; the exact split of
// work between COMPUTE, ACCUMULATE and STORE (continuous streaming, with the
// last two states draining the pipeline) is this design's reading of it.
module sa_controller
  import sa_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter int unsigned DK   = 64,
  localparam int unsigned MW  = N * DK,
  localparam int unsigned AW  = (MW > 1) ? $clog2(MW) : 1,
  localparam int unsigned LAW = $clog2(3 * MW),
  localparam int unsigned SW  = (N * N > 1) ? $clog2(N * N) : 1
) (
  input  logic           clk,
  input  logic           rst,            // synchronous, active high
  // received words
  input  logic           word_valid,
  input  logic [15:0]    word_data,
  output logic           asm_clear,      // resynchronise the byte pairing
  // Q/K/V memory load port
  output logic           ld_en,
  output logic [LAW-1:0] ld_addr,
  output logic [15:0]    ld_data,
  // Q/K read port
  output logic           qk_rd_en,
  output logic [AW-1:0]  q_rd_addr,
  output logic [AW-1:0]  k_rd_addr,
  // MAC control, aligned with the BRAM read data
  output logic           mac_valid,
  output logic           mac_first,
  output logic           mac_last,
  input  logic           mac_out_valid,
  input  q88_t           mac_result,
  // score memory write port
  output logic           sc_wr_en,
  output logic [SW-1:0]  sc_wr_addr,
  output q88_t           sc_wr_data,
  // score transmission
  output logic           send_start,
  input  logic           send_done,
  // status
  output sa_state_t      state,
  output logic           done
);

  localparam int unsigned KW = (DK > 1) ? $clog2(DK) : 1;
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1;

  logic [LAW-1:0] ld_cnt;
  logic [KW-1:0]  kk;
  logic [NW-1:0]  ii, jj;
  logic [AW-1:0]  q_ptr, k_ptr, q_row;
  logic [SW-1:0]  sc_cnt;
  logic           last_read;
  logic           final_score;

  // load port: words are taken only while idle or loading
  always_comb begin
    ld_en   = word_valid && (state == ST_IDLE || state == ST_LOAD);
    ld_addr = (state == ST_IDLE) ? '0 : ld_cnt;
    ld_data = word_data;
  end

  // read port: one Q and one K element per COMPUTE cycle
  assign qk_rd_en  = (state == ST_COMPUTE);
  assign q_rd_addr = q_ptr;
  assign k_rd_addr = k_ptr;
  assign last_read = (ii == NW'(N - 1)) && (jj == NW'(N - 1)) && (kk == KW'(DK - 1));
  assign final_score = mac_out_valid && (sc_cnt == SW'(N * N - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= ST_IDLE;
      ld_cnt     <= '0;
      kk         <= '0;
      ii         <= '0;
      jj         <= '0;
      q_ptr      <= '0;
      k_ptr      <= '0;
      q_row      <= '0;
      sc_cnt     <= '0;
      mac_valid  <= 1'b0;
      mac_first  <= 1'b0;
      mac_last   <= 1'b0;
      sc_wr_en   <= 1'b0;
      sc_wr_addr <= '0;
      sc_wr_data <= '0;
      send_start <= 1'b0;
      done       <= 1'b0;
      asm_clear  <= 1'b0;
    end else begin
      // MAC tags follow the reads by the one-cycle BRAM latency
      mac_valid  <= qk_rd_en;
      mac_first  <= qk_rd_en && (kk == '0);
      mac_last   <= qk_rd_en && (kk == KW'(DK - 1));
      // score write, one cycle after the MAC presents a result
      sc_wr_en   <= mac_out_valid;
      sc_wr_addr <= sc_cnt;
      sc_wr_data <= mac_result;
      if (mac_out_valid) sc_cnt <= sc_cnt + 1'b1;
      send_start <= 1'b0;
      asm_clear  <= 1'b0;

      unique case (state)
        ST_IDLE: begin
          if (word_valid) begin
            ld_cnt <= LAW'(1);
            done   <= 1'b0;
            state  <= (3 * MW == 1) ? ST_COMPUTE : ST_LOAD;
          end
          kk     <= '0;
          ii     <= '0;
          jj     <= '0;
          q_ptr  <= '0;
          k_ptr  <= '0;
          q_row  <= '0;
          sc_cnt <= '0;
        end
        ST_LOAD: begin
          if (word_valid) begin
            ld_cnt <= ld_cnt + 1'b1;
            if (ld_cnt == LAW'(3 * MW - 1)) state <= ST_COMPUTE;
          end
        end
        ST_COMPUTE: begin
          if (kk != KW'(DK - 1)) begin
            kk    <= kk + 1'b1;
            q_ptr <= q_ptr + 1'b1;
            k_ptr <= k_ptr + 1'b1;
          end else begin
            kk <= '0;
            if (jj != NW'(N - 1)) begin
              // next K row, same Q row
              jj    <= jj + 1'b1;
              q_ptr <= q_row;
              k_ptr <= k_ptr + 1'b1;
            end else begin
              // next Q row, K from the top
              jj    <= '0;
              ii    <= ii + 1'b1;
              q_row <= q_row + AW'(DK);
              q_ptr <= q_row + AW'(DK);
              k_ptr <= '0;
            end
          end
          if (last_read) state <= ST_ACCUMULATE;
        end
        ST_ACCUMULATE: begin
          if (final_score) state <= ST_STORE;
        end
        ST_STORE: begin
          done       <= 1'b1;
          send_start <= 1'b1;
          state      <= ST_DONE;
        end
        ST_DONE: begin
          if (send_done) begin
            asm_clear <= 1'b1;
            state     <= ST_IDLE;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // the score counter must account for exactly N*N results per run
  a_no_extra_scores: assert property (@(posedge clk) disable iff (rst)
    mac_out_valid |-> (state == ST_COMPUTE || state == ST_ACCUMULATE))
    else $error("sa_controller: MAC result outside COMPUTE/ACCUMULATE");

endmodule

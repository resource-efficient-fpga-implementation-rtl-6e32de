// score_sender: streams the attention score matrix out through the UART.
//
// On a `start` pulse it reads the NS scores of the score memory in address
// order (row-major S(0,0), S(0,1), ...) and hands each 16-bit Q8.8 score to
// the UART transmitter as two bytes, low byte first, matching the way the
// host sends its words. Each byte is offered with `tx_start` while `tx_busy`
// is low; the byte is then taken by the transmitter, which raises `tx_busy`
// in the next cycle, so the sender waits one cycle before looking at
// `tx_busy` again. `done` pulses once the last byte's stop bit has gone out.
// The memory read has one cycle of latency. A full matrix takes about
// NS*2*10 bit times on the line; the bytes follow each other without idle
// bits. The byte order and the sequencing are this design's choices.
module score_sender #(
  parameter int unsigned NS = 256,                          // number of scores
  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic          clk,
  input  logic          rst,       // synchronous, active high
  input  logic          start,
  // score memory read port
  output logic          rd_en,
  output logic [SW-1:0] rd_addr,
  input  logic [15:0]   rd_data,
  // UART transmitter
  output logic [7:0]    tx_data,
  output logic          tx_start,
  input  logic          tx_busy,
  output logic          busy,
  output logic          done
);

  typedef enum logic [2:0] {
    SS_IDLE, SS_READ, SS_LO, SS_LO_GAP, SS_HI, SS_HI_GAP, SS_FLUSH
  } ss_state_t;

  ss_state_t    st;
  logic [SW-1:0] addr;
  logic [7:0]    hi_byte;

  assign rd_addr = addr;
  assign rd_en   = (st == SS_READ);
  assign busy    = (st != SS_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= SS_IDLE;
      addr     <= '0;
      hi_byte  <= '0;
      tx_data  <= '0;
      tx_start <= 1'b0;
      done     <= 1'b0;
    end else begin
      tx_start <= 1'b0;
      done     <= 1'b0;
      unique case (st)
        SS_IDLE: begin
          addr <= '0;
          if (start) st <= SS_READ;
        end
        SS_READ: st <= SS_LO;        // rd_data is valid in the next cycle
        SS_LO: begin
          if (!tx_busy && !tx_start) begin
            tx_data  <= rd_data[7:0];
            hi_byte  <= rd_data[15:8];
            tx_start <= 1'b1;
            st       <= SS_LO_GAP;
          end
        end
        SS_LO_GAP: st <= SS_HI;      // transmitter raises busy now
        SS_HI: begin
          if (!tx_busy) begin
            tx_data  <= hi_byte;
            tx_start <= 1'b1;
            st       <= SS_HI_GAP;
          end
        end
        SS_HI_GAP: begin
          if (addr == SW'(NS - 1)) begin
            st <= SS_FLUSH;
          end else begin
            addr <= addr + 1'b1;
            st   <= SS_READ;
          end
        end
        SS_FLUSH: begin
          if (!tx_busy) begin
            done <= 1'b1;
            st   <= SS_IDLE;
          end
        end
        default: st <= SS_IDLE;
      endcase
    end
  end

endmodule

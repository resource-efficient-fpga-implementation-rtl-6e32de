// uart_rx: UART receiver, serial line to bytes.
//
// Receives 8N1 frames (one start bit, eight data bits LSB first, one stop
// bit, no parity) from the host. The line is passed through a two-flop
// synchronizer; a falling edge (high then low) starts a frame, so a line
// held low after a bad frame starts nothing until it has gone high again, the start bit is re-checked
// at its middle, and each data bit is sampled in the middle of its bit time
// (CLKS_PER_BIT clock cycles per bit). After the stop bit is sampled the byte
// is presented on `data` with a one-cycle `valid` pulse; if the stop bit is
// low the byte is dropped and `frame_err` pulses instead.
// The frame format, the sampling scheme and the default bit rate (115200 baud
// from a 100 MHz clock, 868 cycles per bit) are this design's choices; the
// accelerator only requires a UART link to the host.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,        // synchronous, active high
  input  logic       rx,         // serial input, idles high
  output logic [7:0] data,
  output logic       valid,      // one-cycle pulse per received byte
  output logic       frame_err   // one-cycle pulse when the stop bit is low
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_t;

  rx_state_t      state;
  logic [CW-1:0]  cnt;
  logic [2:0]     bit_idx;
  logic [7:0]     shreg;
  logic           rx_m, rx_s, rx_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_m <= 1'b1;
      rx_s <= 1'b1;
      rx_d <= 1'b1;
    end else begin
      rx_m <= rx;
      rx_s <= rx_m;
      rx_d <= rx_s;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= RX_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        RX_IDLE: begin
          cnt <= '0;
          if (rx_d && !rx_s) state <= RX_START;   // falling edge only
        end
        RX_START: begin
          // wait half a bit, then confirm the start bit is still low
          if (cnt == CW'((CLKS_PER_BIT - 1) / 2)) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= rx_s ? RX_IDLE : RX_DATA;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        RX_DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {rx_s, shreg[7:1]};
            if (bit_idx == 3'd7) state <= RX_STOP;
            bit_idx <= bit_idx + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        RX_STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            state <= RX_IDLE;
            if (rx_s) begin
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

endmodule
